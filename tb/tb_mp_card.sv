// tb_mp_card - sends a Main-Processor card back-to-back 60-clock frames on
// its 40 links (32 one-tower rings, 8 two-tower forward rings) and checks every 2x2 window it finds
// against sums worked out here, the Global Trigger report (largest electron
// window, number of electron windows, bx) and that the report comes within
// the 60-clock (10 bunch crossing) frame of the header.
module tb_mp_card;
  import l1_pkg::*;
  localparam int unsigned NL = 40, NHF = 8, NBE = NL - NHF, NE = NL + NHF, NWIN = NE - 1, ET = 16;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  logic [NL-1:0][31:0] in_word;
  logic [NL-1:0] in_hdr, in_valid;
  logic [1:0] cl_valid;
  logic [1:0][6:0] cl_phi;
  logic [1:0][NWIN-1:0][13:0] cl_esum, cl_hsum;
  logic [1:0][NWIN-1:0] cl_electron;
  logic gt_valid, link_error;
  logic [11:0] gt_bx, gt_count;
  logic [13:0] gt_et;
  logic [5:0] gt_eta;
  logic [6:0] gt_phi;
  int checks = 0, failures = 0;

  mp_card #(.N_LINKS(NL), .E_THRESH(ET)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  int unsigned te [2][72][NL], th [2][72][NL];
  int ev_bx [2];
  int sent = 0, chk = 0, hdr_cyc [2], cyc = 0, windows = 0;
  int best_et, best_eta, best_phi, n_el;

  // eta column k: links below NBE are one ring each; each forward link
  // NBE + m gives two HCAL-only columns, its low field first
  function automatic int unsigned col(int ev, int p, int k, bit hc);
    int m;
    if (k < NBE) return hc ? th[ev][p][k] : te[ev][p][k];
    m = k - NBE;
    if (!hc) return 0;
    return (m % 2 == 0) ? te[ev][p][NBE + m/2] : th[ev][p][NBE + m/2];
  endfunction

  function automatic void model(int ev);
    bit found = 0;
    best_et = 0; best_eta = 0; best_phi = 0; n_el = 0;
    for (int p = 0; p < 72; p++)
      for (int k = 0; k < NWIN; k++) begin
        int unsigned es, hs;
        int q = (p + 1) % 72;
        es = col(ev, p, k, 0) + col(ev, p, k+1, 0) + col(ev, q, k, 0) + col(ev, q, k+1, 0);
        hs = col(ev, p, k, 1) + col(ev, p, k+1, 1) + col(ev, q, k, 1) + col(ev, q, k+1, 1);
        if (es >= ET && hs <= es / 8) begin
          n_el++;
          if (!found || es > best_et) begin found = 1; best_et = es; best_eta = k; best_phi = p; end
        end
      end
  endfunction

  initial begin
    in_word = '0; in_hdr = '0; in_valid = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int f = 0; f < 5; f++) begin
      int ev;
      ev = f % 2;
      for (int p = 0; p < 72; p++)
        for (int l = 0; l < NL; l++) begin
          te[ev][p][l] = ($urandom % 6 == 0) ? $urandom % 4096 : $urandom % 8;
          th[ev][p][l] = ($urandom % 2 == 0) ? $urandom % 4096 : 0;
        end
      ev_bx[ev] = $urandom % 3564;
      hdr_cyc[ev] = cyc;
      for (int w = 0; w < 60; w++) begin
        for (int l = 0; l < NL; l++) begin
          logic [1727:0] ring;
          for (int p = 0; p < 72; p++) ring[24*p +: 24] = {12'(th[ev][p][l]), 12'(te[ev][p][l])};
          in_hdr[l]   = (w == 0);
          in_valid[l] = (w <= 54);
          in_word[l]  = (w == 0) ? {8'hBC, 12'h000, 12'(ev_bx[ev])} : (w <= 54) ? ring[32*(w-1) +: 32] : '0;
        end
        @(negedge clk);
      end
      sent++;
    end
    in_valid = '0;
    repeat (20) @(negedge clk);
    check(chk == 5, $sformatf("%0d reports for 5 frames", chk));
    check(!link_error, "link error");
    $display("windows %0d", windows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      for (int r = 0; r < 2; r++)
        if (cl_valid[r]) begin
          int p, q, ev;
          ev = chk % 2;
          p = int'(cl_phi[r]);
          q = (p + 1) % 72;
          for (int k = 0; k < NWIN; k++) begin
            int unsigned es, hs;
            es = col(ev, p, k, 0) + col(ev, p, k+1, 0) + col(ev, q, k, 0) + col(ev, q, k+1, 0);
            hs = col(ev, p, k, 1) + col(ev, p, k+1, 1) + col(ev, q, k, 1) + col(ev, q, k+1, 1);
            windows++;
            check(cl_esum[r][k] == 14'(es) && cl_hsum[r][k] == 14'(hs), $sformatf("ev %0d phi %0d eta %0d sums %0d %0d exp %0d %0d", chk, p, k, cl_esum[r][k], cl_hsum[r][k], es, hs));
          end
        end
      if (gt_valid) begin
        int ev;
        ev = chk % 2;
        model(ev);
        check(gt_et == 14'(best_et) && gt_eta == 6'(best_eta) && gt_phi == 7'(best_phi),
              $sformatf("report %0d: et %0d eta %0d phi %0d, expected %0d %0d %0d", chk, gt_et, gt_eta, gt_phi, best_et, best_eta, best_phi));
        check(gt_count == 12'(n_el), $sformatf("electron count %0d expected %0d", gt_count, n_el));
        check(gt_bx == 12'(ev_bx[ev]), "report bx");
        check(cyc - hdr_cyc[ev] <= 60, $sformatf("report %0d clocks after header", cyc - hdr_cyc[ev]));
        if (chk == 0) $display("report latency %0d clocks after header", cyc - hdr_cyc[ev]);
        chk++;
      end
    end
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
