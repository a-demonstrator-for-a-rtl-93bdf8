// mp_card - Main-Processor card of the time-multiplexed trigger.
//
// One card processes one eta half of the calorimeter for every tenth bunch
// crossing. It receives N_LINKS = 40 time-multiplexed links: 36 from the
// Pre-Processor cards of its own half and 4 from the rings of the opposite
// half next to eta = 0, so that clusters across the boundary can be built.
// Link l carries eta ring l (links 0..3 the opposite half's rings, outermost
// first; links 4..39 the card's own rings, from eta = 0 outwards).
//
// The outermost N_HF = 8 links carry the forward calorimeter (HF). There is
// no ECAL there, so an HF ring is two towers wide in eta and its 24-bit
// tower field holds two HCAL energies: the inner tower in the low 12 bits,
// the outer one in the high 12 bits. The card unpacks these into two eta
// columns with zero ECAL, so a card sees N_LINKS + N_HF = 48 eta columns.
//
// Each link is unpacked into beats of two phi towers (mp_unpack); the beats
// of all links together form two complete phi rows of 48 eta towers, which
// feed the 2x2 electron finder two rows per clock (72 rows in 36 clocks,
// inside the 60-clock frame). All links must arrive aligned; link 0 times
// the rows.
//
// Towards the Global Trigger the card reports, once per event, the electron
// window with the largest ECAL sum and the number of electron windows. The
// document leaves the sort and the output format open; this simple maximum
// is this design's choice. The link counts, the 12-bit towers and the
// two-tower-wide HF rings follow the document; which HF tower sits in which
// half of the field is this design's choice.
//
// Timing: the finder result of a row pair comes two clocks after the data
// word that completes it; the report (gt_valid) one clock after the wrap
// window, about 58 clocks (under 10 bunch crossings) after the frame header.
module mp_card
  import l1_pkg::*;
#(
  parameter int unsigned N_LINKS  = 40,
  parameter int unsigned N_HF     = 8,
  parameter int unsigned TOWER_W  = TM_TOWER_W,
  parameter int unsigned E_THRESH = 16,
  parameter int unsigned H_SHIFT  = 3,
  localparam int unsigned SUM_W   = TOWER_W + 2,
  localparam int unsigned N_ETA   = N_LINKS + N_HF,
  localparam int unsigned NWIN    = N_ETA - 1,
  localparam int unsigned EW      = $clog2(N_ETA)
) (
  input  logic                             clk,
  input  logic                             rst,
  input  logic [N_LINKS-1:0][WORD_W-1:0]   in_word,
  input  logic [N_LINKS-1:0]               in_hdr,
  input  logic [N_LINKS-1:0]               in_valid,
  // all 2x2 windows
  output logic [1:0]                       cl_valid,
  output logic [1:0][PHI_W-1:0]            cl_phi,
  output logic [1:0][NWIN-1:0][SUM_W-1:0]  cl_esum,
  output logic [1:0][NWIN-1:0][SUM_W-1:0]  cl_hsum,
  output logic [1:0][NWIN-1:0]             cl_electron,
  // report to the Global Trigger
  output logic                             gt_valid,
  output logic [BX_W-1:0]                  gt_bx,
  output logic [SUM_W-1:0]                 gt_et,
  output logic [EW-1:0]                    gt_eta,
  output logic [PHI_W-1:0]                 gt_phi,
  output logic [11:0]                      gt_count,
  output logic                             link_error
);
  logic [N_LINKS-1:0]                 u_valid, u_first, u_err;
  logic [N_LINKS-1:0][1:0][TOWER_W-1:0] u_ecal, u_hcal;
  logic [N_LINKS-1:0][BX_W-1:0]       u_bx;

  for (genvar l = 0; l < N_LINKS; l++) begin : g_link
    mp_unpack #(.TOWER_W(TOWER_W), .N_PHI_T(N_PHI)) u_unpack (
      .clk, .rst, .in_word(in_word[l]), .in_hdr(in_hdr[l]), .in_valid(in_valid[l]),
      .out_valid(u_valid[l]), .out_first(u_first[l]), .out_ecal(u_ecal[l]),
      .out_hcal(u_hcal[l]), .out_bx(u_bx[l]), .hdr_error(u_err[l]));
  end

  // rows: [row within beat][eta]; HF links give two HCAL-only columns
  localparam int unsigned N_BE = N_LINKS - N_HF;   // barrel and endcap links
  logic [1:0][N_ETA-1:0][TOWER_W-1:0] row_e, row_h;
  always_comb
    for (int r = 0; r < 2; r++)
      for (int l = 0; l < N_LINKS; l++)
        if (l < N_BE) begin
          row_e[r][l] = u_ecal[l][r];
          row_h[r][l] = u_hcal[l][r];
        end else begin
          row_e[r][N_BE + 2*(l-N_BE)]     = '0;
          row_h[r][N_BE + 2*(l-N_BE)]     = u_ecal[l][r];
          row_e[r][N_BE + 2*(l-N_BE) + 1] = '0;
          row_h[r][N_BE + 2*(l-N_BE) + 1] = u_hcal[l][r];
        end

  electron_finder #(.N_ETA(N_ETA), .N_PHI(N_PHI), .TOWER_W(TOWER_W), .ROWS(2),
                    .E_THRESH(E_THRESH), .H_SHIFT(H_SHIFT)) u_ef (
    .clk, .rst, .in_valid(u_valid[0]), .in_first(u_first[0]), .in_ecal(row_e), .in_hcal(row_h),
    .out_valid(cl_valid), .out_phi(cl_phi), .out_esum(cl_esum), .out_hsum(cl_hsum),
    .out_electron(cl_electron));

  // largest electron window of the current clock
  logic             c_found;
  logic [SUM_W-1:0] c_et;
  logic [EW-1:0]    c_eta;
  logic [PHI_W-1:0] c_phi;
  logic [11:0]      c_n;
  logic             wrap_now;
  always_comb begin
    c_found  = 1'b0;
    c_et     = '0;
    c_eta    = '0;
    c_phi    = '0;
    c_n      = '0;
    wrap_now = cl_valid[0] && (cl_phi[0] == PHI_W'(N_PHI - 1));
    for (int r = 0; r < 2; r++)
      if (cl_valid[r])
        for (int k = 0; k < NWIN; k++)
          if (cl_electron[r][k]) begin
            c_n = c_n + 1'b1;
            if (!c_found || cl_esum[r][k] > c_et) begin
              c_found = 1'b1;
              c_et    = cl_esum[r][k];
              c_eta   = EW'(k);
              c_phi   = cl_phi[r];
            end
          end
  end

  // running maximum over the event
  logic             m_found;
  logic [SUM_W-1:0] m_et;
  logic [EW-1:0]    m_eta;
  logic [PHI_W-1:0] m_phi;
  logic [11:0]      m_n;
  logic             take;
  logic [BX_W-1:0]  ev_bx;
  assign take = c_found && (!m_found || c_et > m_et);

  always_ff @(posedge clk) begin
    if (rst) begin
      m_found    <= 1'b0;
      m_et       <= '0;
      m_eta      <= '0;
      m_phi      <= '0;
      m_n        <= '0;
      gt_valid   <= 1'b0;
      gt_bx      <= '0;
      gt_et      <= '0;
      gt_eta     <= '0;
      gt_phi     <= '0;
      gt_count   <= '0;
      ev_bx      <= '0;
      link_error <= 1'b0;
    end else begin
      gt_valid <= 1'b0;
      if (u_first[0]) ev_bx <= u_bx[0];
      if (|u_err || (u_valid != '0 && u_valid != '1)) link_error <= 1'b1;
      if (wrap_now) begin
        gt_valid <= 1'b1;
        gt_bx    <= ev_bx;
        gt_et    <= take ? c_et  : (m_found ? m_et : '0);
        gt_eta   <= take ? c_eta : m_eta;
        gt_phi   <= take ? c_phi : m_phi;
        gt_count <= m_n + c_n;
        m_found  <= 1'b0;
        m_et     <= '0;
        m_n      <= '0;
      end else begin
        m_n <= m_n + c_n;
        if (take) begin
          m_found <= 1'b1;
          m_et    <= c_et;
          m_eta   <= c_eta;
          m_phi   <= c_phi;
        end
      end
    end
  end

  // the rows of all links must arrive together
  assert property (@(posedge clk) disable iff (rst) u_valid == '0 || u_valid == '1)
    else $error("mp_card: links not aligned");
endmodule
