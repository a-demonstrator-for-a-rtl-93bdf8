// tm_system - time-multiplexed calorimeter trigger: Pre-Processor cards
// feeding Main-Processor nodes in round robin.
//
// Each eta half has N_PP = 36 Pre-Processor cards (pp_tmux), one per eta
// ring, index 0 next to eta = 0. The outermost N_HF = 8 of them serve the
// forward calorimeter, whose rings are two towers wide (HCAL only). There are N_NODES = 10 Main-Processor
// nodes, each of two cards (mp_card): the MP- card takes the negative eta
// half, the MP+ card the positive one. Every Pre-Processor sends bunch
// crossing n to node n mod 10 over one link per card of its half; the
// N_BOUND = 4 Pre-Processors of each half nearest eta = 0 also send the same
// frame to the card of the opposite half of the same node, which therefore
// sees 36 + 4 = 40 rings. A node has ten bunch crossings to receive and
// process one bunch crossing.
//
// All cards run on one 240 MHz clock (six clocks per bunch crossing); a
// common counter marks the first clock of each bunch crossing (`bx_start`)
// and numbers the bunch crossings round the orbit; bc0 restarts it. All
// Pre-Processors are reset together, so their round-robin counters agree,
// and the links are taken to have equal latency.
//
// The card counts, link counts and the boundary sharing follow the
// document; the orbit counter and equal link latencies are this design's.
//
// Interface: pp_in[h][j][i] is the byte on input link i of Pre-Processor j
// of half h (0: minus, 1: plus) on this clock. Each MP card reports one
// electron candidate per event on gt_*[node][half].
module tm_system
  import l1_pkg::*;
#(
  parameter int unsigned N_PP     = 36,
  parameter int unsigned N_IN     = 36,
  parameter int unsigned N_NODES  = TM_N_NODES,
  parameter int unsigned N_BOUND  = 4,
  parameter int unsigned N_HF     = 8,
  localparam int unsigned N_LINKS = N_PP + N_BOUND,
  localparam int unsigned N_ETA   = N_LINKS + N_HF,
  localparam int unsigned SUM_W   = TM_TOWER_W + 2,
  localparam int unsigned EW      = $clog2(N_ETA)
) (
  input  logic                                       clk,
  input  logic                                       rst,
  input  logic                                       bc0,
  input  logic [1:0][N_PP-1:0][N_IN-1:0][7:0]        pp_in,
  output logic                                       bx_start,
  output logic [BX_W-1:0]                            bx,
  output logic [N_NODES-1:0][1:0]                    gt_valid,
  output logic [N_NODES-1:0][1:0][BX_W-1:0]          gt_bx,
  output logic [N_NODES-1:0][1:0][SUM_W-1:0]         gt_et,
  output logic [N_NODES-1:0][1:0][EW-1:0]            gt_eta,
  output logic [N_NODES-1:0][1:0][PHI_W-1:0]         gt_phi,
  output logic [N_NODES-1:0][1:0][11:0]              gt_count,
  output logic [N_NODES-1:0][1:0]                    link_error
);
  // bunch-crossing counter
  logic [3:0] sub;
  always_ff @(posedge clk) begin
    if (rst || bc0) begin
      sub <= '0;
      bx  <= '0;
    end else if (sub == 4'(TM_CLK_BX - 1)) begin
      sub <= '0;
      bx  <= (bx == BX_W'(ORBIT_BX - 1)) ? '0 : bx + 1'b1;
    end else begin
      sub <= sub + 1'b1;
    end
  end
  assign bx_start = (sub == '0);

  // Pre-Processors
  logic [1:0][N_PP-1:0][N_NODES-1:0][WORD_W-1:0] pp_word;
  logic [1:0][N_PP-1:0][N_NODES-1:0]             pp_hdr, pp_valid;

  for (genvar h = 0; h < 2; h++) begin : g_half
    for (genvar j = 0; j < N_PP; j++) begin : g_pp
      pp_tmux #(.N_IN(N_IN), .N_NODES(N_NODES), .CLK_PER_BX(TM_CLK_BX), .TOWER_W(TM_TOWER_W)) u_pp (
        .clk, .rst, .bx_start, .bx, .in_byte(pp_in[h][j]),
        .out_word(pp_word[h][j]), .out_hdr(pp_hdr[h][j]), .out_valid(pp_valid[h][j]));
    end
  end

  // Main-Processor nodes
  for (genvar k = 0; k < N_NODES; k++) begin : g_node
    for (genvar h = 0; h < 2; h++) begin : g_card
      logic [N_LINKS-1:0][WORD_W-1:0] w;
      logic [N_LINKS-1:0]             hd, vl;
      logic [1:0]                     cv;
      logic [1:0][PHI_W-1:0]          cp;
      logic [1:0][N_ETA-2:0][SUM_W-1:0] ce, ch;
      logic [1:0][N_ETA-2:0]          cl;
      always_comb
        for (int l = 0; l < N_LINKS; l++)
          if (l < N_BOUND) begin
            // opposite half, outermost boundary ring first
            w[l]  = pp_word[1-h][N_BOUND-1-l][k];
            hd[l] = pp_hdr[1-h][N_BOUND-1-l][k];
            vl[l] = pp_valid[1-h][N_BOUND-1-l][k];
          end else begin
            w[l]  = pp_word[h][l-N_BOUND][k];
            hd[l] = pp_hdr[h][l-N_BOUND][k];
            vl[l] = pp_valid[h][l-N_BOUND][k];
          end
      mp_card #(.N_LINKS(N_LINKS), .N_HF(N_HF), .TOWER_W(TM_TOWER_W)) u_mp (
        .clk, .rst, .in_word(w), .in_hdr(hd), .in_valid(vl),
        .cl_valid(cv), .cl_phi(cp), .cl_esum(ce), .cl_hsum(ch), .cl_electron(cl),
        .gt_valid(gt_valid[k][h]), .gt_bx(gt_bx[k][h]), .gt_et(gt_et[k][h]),
        .gt_eta(gt_eta[k][h]), .gt_phi(gt_phi[k][h]), .gt_count(gt_count[k][h]),
        .link_error(link_error[k][h]));
    end
  end
endmodule
