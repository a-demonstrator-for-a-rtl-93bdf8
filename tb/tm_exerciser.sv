// tm_exerciser - drives the Pre-Processor inputs of a time-multiplexed
// system with random calorimeter data for N_BX bunch crossings and checks
// each Main-Processor report against a model worked out here: which node
// serves which bunch crossing (round robin), the largest electron 2x2
// window over the card's 48 eta columns (the 4 boundary rings of the
// opposite half, 28 barrel and endcap rings and 8 two-tower forward
// rings), the number of electron windows, the bx number and the latency. Every third bunch crossing gets an electron cluster straddling
// eta = 0 so that the boundary sharing decides the report.
module tm_exerciser
  import l1_pkg::*;
#(
  parameter int unsigned N_PP    = 36,
  parameter int unsigned N_IN    = 36,
  parameter int unsigned N_NODES = 10,
  parameter int unsigned N_BX    = 12,
  parameter int unsigned ET      = 16,
  localparam int unsigned NB     = 4,
  parameter int unsigned N_HF    = 8,
  localparam int unsigned NL     = N_PP + NB,
  localparam int unsigned NBE    = NL - N_HF,
  localparam int unsigned NE     = NL + N_HF,
  localparam int unsigned NPHI   = 2 * N_IN,
  localparam int unsigned EW     = $clog2(NE)
) (
  input  logic                                  clk,
  input  logic                                  rst,
  output logic [1:0][N_PP-1:0][N_IN-1:0][7:0]   pp_in,
  input  logic                                  bx_start,
  input  logic [BX_W-1:0]                       bx,
  input  logic [N_NODES-1:0][1:0]               gt_valid,
  input  logic [N_NODES-1:0][1:0][BX_W-1:0]     gt_bx,
  input  logic [N_NODES-1:0][1:0][13:0]         gt_et,
  input  logic [N_NODES-1:0][1:0][EW-1:0]       gt_eta,
  input  logic [N_NODES-1:0][1:0][PHI_W-1:0]    gt_phi,
  input  logic [N_NODES-1:0][1:0][11:0]         gt_count,
  input  logic [N_NODES-1:0][1:0]               link_error,
  output int                                    checks,
  output int                                    failures,
  output int                                    reports,
  output int                                    boundary_wins,
  output int                                    nodes_used,
  output logic                                  done
);
  // towers [bx][half][ring][phi]
  int unsigned te [N_BX][2][N_PP][NPHI], th [N_BX][2][N_PP][NPHI];
  int bx_num [N_BX];
  int bx_end_cyc [N_BX];
  int cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("tm_exerciser FAIL: %s", what); end
  endtask

  // eta column e of card half h for event n. Columns below NBE are the
  // rings of links 0..NBE-1; each forward (HF) link l >= NBE gives two
  // HCAL-only columns, the low tower field first, then the high one.
  function automatic int unsigned tower(int n, int h, int e, int p, bit hc);
    int hh, j, l, m;
    if (e < NBE) begin
      l = e;
      if (l < NB) begin hh = 1 - h; j = NB - 1 - l; end
      else begin hh = h; j = l - NB; end
      return hc ? th[n][hh][j][p] : te[n][hh][j][p];
    end
    m = e - NBE;
    j = NBE + m / 2 - NB;
    if (!hc) return 0;
    return (m % 2 == 0) ? te[n][h][j][p] : th[n][h][j][p];
  endfunction

  int node_of [N_BX];
  bit node_seen [N_NODES];

  initial begin
    checks = 0; failures = 0; reports = 0; boundary_wins = 0; nodes_used = 0; done = 0;
    pp_in = '0;
    for (int n = 0; n < N_BX; n++) begin
      for (int h = 0; h < 2; h++)
        for (int j = 0; j < N_PP; j++)
          for (int p = 0; p < NPHI; p++) begin
            te[n][h][j][p] = ($urandom % 8 == 0) ? $urandom % 2048 : $urandom % 8;
            th[n][h][j][p] = ($urandom % 2 == 0) ? $urandom % 4096 : 0;
          end
      if (n % 3 == 0) begin
        // a large electron across eta = 0 at phi 5..6
        for (int h = 0; h < 2; h++)
          for (int p = 5; p <= 6; p++) begin
            te[n][h][0][p] = 4000;
            th[n][h][0][p] = 0;
          end
      end
      node_of[n] = n % N_NODES;
    end
    @(negedge clk);
    while (rst) @(negedge clk);
    // wait for the first bunch-crossing start
    while (!bx_start) @(negedge clk);
    for (int n = 0; n < N_BX; n++) begin
      for (int s = 0; s < TM_CLK_BX; s++) begin
        if (s == 0) bx_num[n] = int'(bx);
        for (int h = 0; h < 2; h++)
          for (int j = 0; j < N_PP; j++)
            for (int i = 0; i < N_IN; i++) begin
              logic [47:0] lw;
              lw = {12'(th[n][h][j][2*i+1]), 12'(te[n][h][j][2*i+1]), 12'(th[n][h][j][2*i]), 12'(te[n][h][j][2*i])};
              pp_in[h][j][i] = lw[8*s +: 8];
            end
        if (s == TM_CLK_BX - 1) bx_end_cyc[n] = cyc;
        @(negedge clk);
      end
    end
    pp_in = '0;
    // last report: frame of 60 clocks after the last bunch crossing
    repeat (N_NODES * TM_CLK_BX + 10) @(negedge clk);
    for (int k = 0; k < N_NODES; k++) nodes_used += int'(node_seen[k]);
    check(reports == 2 * N_BX, $sformatf("%0d reports for %0d bunch crossings", reports, N_BX));
    check(link_error == '0, "link error flagged");
    done = 1;
  end

  int next_ev [N_NODES];
  initial for (int k = 0; k < N_NODES; k++) next_ev[k] = k;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) for (int k = 0; k < N_NODES; k++) begin
      int n;
      n = next_ev[k];
      for (int h = 0; h < 2; h++)
        if (gt_valid[k][h]) begin
          int best, be, bp, cnt;
          bit found;
          found = 0; best = 0; be = 0; bp = 0; cnt = 0;
          // after the driven bunch crossings the inputs are zero: no electrons
          if (n >= N_BX)
            check(gt_count[k][h] == '0, $sformatf("node %0d: electrons in an empty bunch crossing", k));
          if (n < N_BX) begin
            for (int p = 0; p < NPHI; p++)
              for (int l = 0; l < NE - 1; l++) begin
                int unsigned es, hs;
                int q;
                q = (p + 1) % NPHI;
                es = tower(n, h, l, p, 0) + tower(n, h, l+1, p, 0) + tower(n, h, l, q, 0) + tower(n, h, l+1, q, 0);
                hs = tower(n, h, l, p, 1) + tower(n, h, l+1, p, 1) + tower(n, h, l, q, 1) + tower(n, h, l+1, q, 1);
                if (es >= ET && hs <= es / 8) begin
                  cnt++;
                  if (!found || es > best) begin found = 1; best = es; be = l; bp = p; end
                end
              end
            check(gt_et[k][h] == 14'(best) && int'(gt_eta[k][h]) == be && int'(gt_phi[k][h]) == bp,
                  $sformatf("node %0d half %0d bx %0d: et %0d eta %0d phi %0d, expected %0d %0d %0d",
                            k, h, n, gt_et[k][h], gt_eta[k][h], gt_phi[k][h], best, be, bp));
            check(int'(gt_count[k][h]) == cnt, $sformatf("node %0d half %0d: count %0d expected %0d", k, h, gt_count[k][h], cnt));
            check(int'(gt_bx[k][h]) == bx_num[n], "report bx");
            // latency: the node has ten bunch crossings (60 clocks)
            check(cyc - bx_end_cyc[n] <= N_NODES * TM_CLK_BX,
                  $sformatf("report %0d clocks after the last byte", cyc - bx_end_cyc[n]));
            if (found && (be == NB - 1)) boundary_wins++;
            node_seen[k] = 1;
            reports++;
          end
        end
      if (gt_valid[k] != 2'b00) begin
        check(gt_valid[k] == 2'b11, "MP- and MP+ cards of a node out of step");
        next_ev[k] = n + N_NODES;
      end
    end
  end
endmodule
