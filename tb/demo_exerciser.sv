// demo_exerciser - drives the demonstrator firmware and checks it:
//  1. Links with different skews carry a repeating calorimeter event (72 phi
//     rows, frame marker on row 0). After alignment every cluster window is
//     compared with 2x2 sums worked out here; the phi loop must take 72
//     clocks (24 bunch crossings).
//  2. Level-1 accepts are fired (one too early after another, which must be
//     counted as lost); both DAQ buffers are read and checked: the input
//     copy must hold whole rows in phi order, the output copy the matching
//     clusters.
//  3. The pattern RAMs capture the aligned link data; it is read back.
//  4. A second event is loaded into the RAMs and played into the algorithm.
//  5. The bunch-crossing pattern drives the algorithm input and the
//     transmitters.
// Counts of each mechanism are reported through the `seen_*` outputs.
module demo_exerciser
  import l1_pkg::*;
#(
  parameter int unsigned NL   = 12,
  parameter int unsigned RAMD = 1024,
  parameter int unsigned LAT  = 64,
  parameter int unsigned WIN  = 3,
  localparam int unsigned NE   = 2 * NL,
  localparam int unsigned NWIN = NE - 1,
  localparam int unsigned RAW  = $clog2(RAMD),
  localparam int unsigned LW   = (NL > 1) ? $clog2(NL) : 1,
  localparam int unsigned PLAY = 144      // RAM pattern: two 72-row loops
) (
  input  logic                 clk,
  input  logic                 rst,
  output logic                 bc0,
  output logic [NL-1:0][31:0]  rx_data,
  output logic [NL-1:0]        rx_start,
  output logic                 align,
  input  logic                 aligned,
  input  logic [NL-1:0][2:0]   link_delay,
  input  logic [NL-1:0][31:0]  tx_data,
  output src_sel_e             alg_src,
  output src_sel_e             tx_src,
  output ram_mode_e            ram_mode,
  output logic                 ram_start,
  output logic [RAW-1:0]       ram_play_last,
  output logic [LW-1:0]        ram_link,
  output logic                 ram_we,
  output logic [RAW-1:0]       ram_addr,
  output logic [31:0]          ram_wdata,
  input  logic [31:0]          ram_rdata,
  input  logic [NL-1:0]        ram_full,
  input  logic [11:0]          bx,
  input  logic [3:0]           bx_sub,
  output logic                 l1a,
  output logic [1:0]           daq_rd_en,
  input  logic [NL-1:0][31:0]  daq_in_data,
  input  logic [NE-1:0][31:0]  daq_out_data,
  input  logic [1:0]           daq_rd_last,
  input  logic [1:0]           daq_empty,
  input  logic [1:0]           daq_overflow,
  input  logic [1:0][6:0]      daq_events,
  input  logic [1:0][15:0]     daq_l1a_lost,
  input  logic                 cl_valid,
  input  logic [6:0]           cl_phi,
  input  logic [NWIN-1:0][9:0] cl_esum,
  input  logic [NWIN-1:0][9:0] cl_hsum,
  input  logic [NWIN-1:0]      cl_electron,
  output int                   checks,
  output int                   failures,
  output int                   seen_align,
  output int                   seen_link_loops,
  output int                   seen_daq_events,
  output int                   seen_l1a_lost,
  output int                   seen_capture,
  output int                   seen_ram_loops,
  output int                   seen_pattern_loops,
  output logic                 done
);
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 400) $display("FAIL: %s", what); end
  endtask

  // two events: towers [ev][phi][eta]
  int unsigned te [2][72][NE], th [2][72][NE];
  function automatic logic [31:0] link_word(int ev, int phi, int i);
    return {8'(th[ev][phi][2*i+1]), 8'(th[ev][phi][2*i]), 8'(te[ev][phi][2*i+1]), 8'(te[ev][phi][2*i])};
  endfunction

  // link streams with skew
  int skew [NL];
  int src = 0;
  always_comb
    for (int i = 0; i < NL; i++) begin
      int s;
      s = src - skew[i];
      if (s < 0) begin rx_data[i] = '0; rx_start[i] = 0; end
      else begin rx_data[i] = link_word(0, s % 72, i); rx_start[i] = (s % 72 == 0); end
    end
  always @(posedge clk) src <= src + 1;

  // cluster checker, active when `chk_ev` >= 0
  int chk_ev = -1;
  int wraps = 0, windows = 0, first_phi0 = -1, loop_clocks = -1, cyc = 0, electrons = 0;
  always @(posedge clk) begin
    cyc++;
    if (cl_valid && chk_ev >= 0) begin
      int p, q;
      p = int'(cl_phi);
      q = (p + 1) % 72;
      if (p == 0) first_phi0 = cyc;
      if (p == 71) begin
        wraps++;
        if (first_phi0 > 0 && loop_clocks < 0) loop_clocks = cyc - first_phi0 + 1;
      end
      for (int k = 0; k < NWIN; k++) begin
        int unsigned es, hs;
        bit el;
        es = te[chk_ev][p][k] + te[chk_ev][p][k+1] + te[chk_ev][q][k] + te[chk_ev][q][k+1];
        hs = th[chk_ev][p][k] + th[chk_ev][p][k+1] + th[chk_ev][q][k] + th[chk_ev][q][k+1];
        el = (es >= 8) && (hs <= es / 8);
        electrons += int'(el);
        windows++;
        check(cl_esum[k] == 10'(es) && cl_hsum[k] == 10'(hs) && cl_electron[k] == el,
              $sformatf("ev %0d phi %0d eta %0d: %0d/%0d/%0d expected %0d/%0d/%0d", chk_ev, p, k,
                        cl_esum[k], cl_hsum[k], cl_electron[k], es, hs, el));
      end
    end
  end

  // phi row of event `ev` whose link words match all of `w`, or -1
  function automatic int find_row(int ev, logic [NL-1:0][31:0] w);
    for (int p = 0; p < 72; p++) begin
      bit m = 1;
      for (int i = 0; i < NL; i++) if (w[i] != link_word(ev, p, i)) m = 0;
      if (m) return p;
    end
    return -1;
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0;
    seen_align = 0; seen_link_loops = 0; seen_daq_events = 0; seen_l1a_lost = 0;
    seen_capture = 0; seen_ram_loops = 0; seen_pattern_loops = 0;
    bc0 = 0; align = 0; ram_start = 0; ram_we = 0; l1a = 0; alg_src = SRC_LINK; tx_src = SRC_PATTERN;
    ram_mode = RAM_IDLE; ram_link = '0; ram_addr = '0; ram_wdata = '0; daq_rd_en = '0;
    ram_play_last = RAW'(PLAY - 1);
    for (int ev = 0; ev < 2; ev++)
      for (int p = 0; p < 72; p++)
        for (int k = 0; k < NE; k++) begin
          te[ev][p][k] = ($urandom % 5 == 0) ? $urandom % 256 : $urandom % 4;
          th[ev][p][k] = ($urandom % 3 == 0) ? $urandom % 256 : 0;
        end
    for (int i = 0; i < NL; i++) skew[i] = $urandom % 6;

    @(negedge clk);
    while (rst) @(negedge clk);
    // ---- 1. link source, alignment and clusters
    align = 1; @(negedge clk); align = 0;
    while (!aligned) @(negedge clk);
    seen_align++;
    begin
      int mx = 0;
      foreach (skew[i]) if (skew[i] > mx) mx = skew[i];
      for (int i = 0; i < NL; i++)
        check(int'(link_delay[i]) == mx - skew[i],
              $sformatf("link %0d delay %0d for skew %0d", i, link_delay[i], skew[i]));
    end
    chk_ev = 0;
    repeat (200) @(negedge clk);
    check(wraps >= 2, "no complete phi loop from the links");
    check(loop_clocks == 72, $sformatf("phi loop took %0d clocks, expected 72 (24 bx)", loop_clocks));
    seen_link_loops = wraps;

    // ---- 2. DAQ
    // the second accept comes while the first window is still copied
    l1a = 1; @(negedge clk); @(negedge clk); l1a = 0;
    repeat (WIN + 2) @(negedge clk);
    check(daq_l1a_lost[0] == 16'd1 && daq_l1a_lost[1] == 16'd1, "lost Level-1 accept not counted");
    seen_l1a_lost = int'(daq_l1a_lost[0]);
    check(daq_events[0] == 1 && daq_events[1] == 1, "DAQ events not captured");
    begin
      int r0;
      r0 = -1;
      for (int n = 0; n < WIN; n++) begin
        int r;
        check(!daq_empty[0] && !daq_empty[1], "DAQ buffer empty");
        r = find_row(0, daq_in_data);
        check(r >= 0, "DAQ input word is not a row of the event");
        if (r0 < 0) r0 = r;
        check(r == (r0 + n) % 72, "DAQ input rows not consecutive");
        for (int i = 0; i < NL; i++)
          check(r >= 0 && daq_in_data[i] == link_word(0, r, i), $sformatf("DAQ input link %0d", i));
        check(daq_rd_last[0] == (n == WIN - 1), "DAQ input last flag");
        // clusters: the output copy shows a window row with its phi
        if (daq_out_data[NE-1][7]) begin
          int p, q;
          p = int'(daq_out_data[NE-1][6:0]);
          q = (p + 1) % 72;
          for (int k = 0; k < NWIN; k++)
            check(daq_out_data[k][9:0] == 10'(te[0][p][k] + te[0][p][k+1] + te[0][q][k] + te[0][q][k+1]),
                  $sformatf("DAQ output phi %0d window %0d", p, k));
        end
        check(daq_rd_last[1] == (n == WIN - 1), "DAQ output last flag");
        daq_rd_en = 2'b11; @(negedge clk); daq_rd_en = 0;
      end
      check(daq_empty == 2'b11, "DAQ buffers not empty after readout");
      seen_daq_events++;
    end

    // ---- 3. capture aligned link data into the RAMs
    ram_mode = RAM_CAPTURE; ram_start = 1; @(negedge clk); ram_start = 0;
    repeat (RAMD + 2) @(negedge clk);
    check(&ram_full, "RAMs not full after capture");
    seen_capture = int'(&ram_full);
    ram_mode = RAM_IDLE;
    begin
      int r0;
      logic [NL-1:0][31:0] w0;
      for (int i = 0; i < NL; i++) begin
        ram_link = LW'(i); ram_addr = '0; @(negedge clk); @(negedge clk);
        w0[i] = ram_rdata;
      end
      r0 = find_row(0, w0);
      check(r0 >= 0, "first captured word is not a row");
      for (int i = 0; i < NL; i++)
        for (int a = 0; a < RAMD; a += 37) begin
          ram_link = LW'(i); ram_addr = RAW'(a); @(negedge clk); @(negedge clk);
          check(ram_rdata == link_word(0, (r0 + a) % 72, i), $sformatf("captured link %0d word %0d", i, a));
        end
    end

    // ---- 4. play event 1 from the RAMs into the algorithm
    for (int i = 0; i < NL; i++)
      for (int a = 0; a < PLAY; a++) begin
        ram_link = LW'(i); ram_addr = RAW'(a); ram_wdata = link_word(1, a % 72, i); ram_we = 1;
        @(negedge clk);
      end
    ram_we = 0;
    chk_ev = -1;
    alg_src = SRC_RAM; tx_src = SRC_RAM;
    ram_mode = RAM_PLAY; ram_start = 1; @(negedge clk); ram_start = 0;
    repeat (3) @(negedge clk);
    chk_ev = 1;
    wraps = 0;
    for (int c = 0; c < 150; c++) begin
      // transmitters carry the RAM words too: all links from the same row
      if (c > 2) begin
        int r;
        r = find_row(1, tx_data);
        check(r >= 0, "transmit words are not a RAM row");
      end
      @(negedge clk);
    end
    check(wraps >= 1, "no complete phi loop from the RAMs");
    seen_ram_loops = wraps;

    // ---- 5. bunch-crossing pattern
    chk_ev = -1;
    alg_src = SRC_PATTERN; tx_src = SRC_PATTERN;
    bc0 = 1; @(negedge clk); bc0 = 0;
    repeat (3) @(negedge clk);
    for (int c = 0; c < 40; c++) begin
      for (int i = 0; i < NL; i++)
        check(tx_data[i][31:24] == 8'(i) && tx_data[i][23:0] == tx_data[0][23:0], "transmit pattern");
      // tx_data is registered: it shows the counter of the previous clock
      check(tx_data[0][11:0] == bx || tx_data[0][11:0] + 12'd1 == bx, "pattern bx");
      @(negedge clk);
    end
    begin
      int pw = 0;
      for (int c = 0; c < 200; c++) begin
        if (cl_valid && cl_phi == 71) pw++;
        @(negedge clk);
      end
      check(pw >= 2, "pattern source did not drive the algorithm");
      seen_pattern_loops = pw;
    end
    check(daq_overflow == 0, "DAQ overflow");
    $display("windows checked %0d electrons %0d", windows, electrons);
    done = 1;
  end
endmodule
