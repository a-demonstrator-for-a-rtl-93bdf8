// ef_harness - drives one electron_finder with random events and checks
// every 2x2 window against sums computed here from the stored towers.
// Reports its check and failure counts and how long each event took to load.
module ef_harness #(
  parameter int unsigned N_ETA   = 24,
  parameter int unsigned TOWER_W = 8,
  parameter int unsigned ROWS    = 1,
  parameter int unsigned N_EVENTS = 6
) (
  input  logic clk,
  input  logic rst,
  output int   checks,
  output int   failures,
  output int   electrons,
  output int   vetoed,
  output int   load_clocks,
  output logic done
);
  localparam int unsigned N_PHI = 72;
  localparam int unsigned SUM_W = TOWER_W + 2;
  localparam int unsigned NWIN  = N_ETA - 1;
  localparam int unsigned NBEATS = N_PHI / ROWS;
  localparam int unsigned E_THRESH = 8, H_SHIFT = 3;

  logic in_valid, in_first;
  logic [ROWS-1:0][N_ETA-1:0][TOWER_W-1:0] in_ecal, in_hcal;
  logic [ROWS-1:0] out_valid;
  logic [ROWS-1:0][6:0] out_phi;
  logic [ROWS-1:0][NWIN-1:0][SUM_W-1:0] out_esum, out_hsum;
  logic [ROWS-1:0][NWIN-1:0] out_electron;

  electron_finder #(.N_ETA(N_ETA), .N_PHI(N_PHI), .TOWER_W(TOWER_W), .ROWS(ROWS),
                    .E_THRESH(E_THRESH), .H_SHIFT(H_SHIFT)) dut (.*);

  int unsigned ev_e [2][N_PHI][N_ETA];
  int unsigned ev_h [2][N_PHI][N_ETA];

  function automatic int unsigned rnd_tower(bit hcal);
    int unsigned v;
    if (hcal) v = ($urandom % 3 == 0) ? $urandom % (1 << TOWER_W) : 0;
    else      v = ($urandom % 4 == 0) ? $urandom % (1 << TOWER_W) : $urandom % 3;
    return v;
  endfunction

  // stimulus
  initial begin
    in_valid = 0; in_first = 0; in_ecal = '0; in_hcal = '0; done = 0;
    @(negedge clk);
    while (rst) @(negedge clk);
    for (int ev = 0; ev < N_EVENTS; ev++) begin
      for (int b = 0; b < NBEATS; b++) begin
        // odd events get random gaps between beats; even ones stream
        while (ev % 2 == 1 && $urandom % 4 == 0) begin
          in_valid = 0;
          @(negedge clk);
        end
        in_valid = 1;
        in_first = (b == 0);
        for (int r = 0; r < ROWS; r++)
          for (int k = 0; k < N_ETA; k++) begin
            int unsigned e, h;
            e = rnd_tower(0);
            h = rnd_tower(1);
            ev_e[ev % 2][b*ROWS + r][k] = e;
            ev_h[ev % 2][b*ROWS + r][k] = h;
            in_ecal[r][k] = TOWER_W'(e);
            in_hcal[r][k] = TOWER_W'(h);
          end
        @(negedge clk);
      end
      in_valid = 0;
      in_first = 0;
      if (ev == 2) repeat (5) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    done = 1;
  end

  // checker
  int chk_ev = 0;
  int exp_phi = 0;
  int first_out_cyc = -1;
  int cyc = 0;
  initial begin checks = 0; failures = 0; electrons = 0; vetoed = 0; load_clocks = -1; end
  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      for (int r = 0; r < ROWS; r++) begin
        if (out_valid[r]) begin
          int p, q;
          p = int'(out_phi[r]);
          checks++;
          if (p != exp_phi) begin
            failures++;
            $display("ef_harness ROWS=%0d: phi %0d, expected %0d", ROWS, p, exp_phi);
          end
          q = (p + 1) % N_PHI;
          if (p == 0 && first_out_cyc < 0) first_out_cyc = cyc;
          for (int k = 0; k < NWIN; k++) begin
            int unsigned es, hs;
            bit el;
            es = ev_e[chk_ev%2][p][k] + ev_e[chk_ev%2][p][k+1] + ev_e[chk_ev%2][q][k] + ev_e[chk_ev%2][q][k+1];
            hs = ev_h[chk_ev%2][p][k] + ev_h[chk_ev%2][p][k+1] + ev_h[chk_ev%2][q][k] + ev_h[chk_ev%2][q][k+1];
            el = (es >= E_THRESH) && (hs <= es / 8);
            checks++;
            if (out_esum[r][k] != SUM_W'(es) || out_hsum[r][k] != SUM_W'(hs) || out_electron[r][k] != el) begin
              failures++;
              if (failures < 10)
                $display("ef_harness ROWS=%0d ev %0d phi %0d eta %0d: got %0d/%0d/%0d expected %0d/%0d/%0d",
                         ROWS, chk_ev, p, k, out_esum[r][k], out_hsum[r][k], out_electron[r][k], es, hs, el);
            end
            if (el) electrons++;
            else if (es >= E_THRESH) vetoed++;
          end
          if (p == N_PHI - 1) begin
            // first event: windows from phi 0 to the wrap window
            if (chk_ev == 0) load_clocks = cyc - first_out_cyc + 1;
            chk_ev++;
            exp_phi = 0;
          end else exp_phi = p + 1;
        end
      end
    end
  end
  // all events must have been reported in full
  final if (chk_ev != N_EVENTS) $display("ef_harness ROWS=%0d: only %0d events seen", ROWS, chk_ev);
endmodule
