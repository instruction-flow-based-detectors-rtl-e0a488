// tb_cam_detector: CAM detector at its full size (WL=5, SL=1, 213 rows)
// learns the windows of fault-free square-and-multiply runs, then checks
// fresh runs into which one fault per run is injected (single bit, single
// byte, branch to opposite, instruction to instruction). A set model of the
// learned windows predicts every check result and matching row; each result
// must appear exactly two cycles after the fetch that completed its window.
// A second, 16-row instance sees the same stream and must overflow. The test
// also loads one row by software and checks the sticky alarm and its clear.
module tb_cam_detector;
  import tb_pkg::*;
  localparam int WL = 5, SL = 1, XLEN = 32, DEPTH = 213, SMALL = 16;
  localparam int AW = $clog2(DEPTH), CNTW = $clog2(DEPTH + 1);
  localparam int LEARN_RUNS = 40, EVAL_RUNS = 120;

  logic clk = 0, rst_n = 0, enable = 1, restart = 0, learn = 0;
  logic fetch_valid = 0, tbl_clear = 0, tbl_wr_en = 0, alarm_clr = 0;
  logic [XLEN-1:0] fetch_instr = '0;
  logic [AW-1:0] tbl_wr_addr = '0;
  logic [WL*XLEN-1:0] tbl_wr_data = '0;
  logic filled, chk_valid, chk_fault, alarm, overflow;
  logic [AW-1:0] match_addr;
  logic [CNTW-1:0] entries;
  logic s_filled, s_valid, s_fault, s_alarm, s_overflow;
  logic [$clog2(SMALL)-1:0] s_addr;
  logic [$clog2(SMALL+1)-1:0] s_entries;

  cam_detector #(.WL(WL), .SL(SL), .XLEN(XLEN), .DEPTH(DEPTH)) dut (.*);
  cam_detector #(.WL(WL), .SL(SL), .XLEN(XLEN), .DEPTH(SMALL)) dut_s (
    .clk, .rst_n, .enable, .restart, .learn, .fetch_valid, .fetch_instr,
    .tbl_clear, .tbl_wr_en(1'b0), .tbl_wr_addr('0), .tbl_wr_data('0), .alarm_clr,
    .filled(s_filled), .chk_valid(s_valid), .chk_fault(s_fault), .match_addr(s_addr),
    .alarm(s_alarm), .entries(s_entries), .overflow(s_overflow));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  // expected results, indexed by the cycle in which they must show
  bit exp_v [int];
  bit exp_f [int];
  int exp_a [int];

  // model
  int unsigned tbl [logic [WL*XLEN-1:0]];
  int unsigned n_tbl = 0;
  bit model_ovf = 0;
  word_t win [$];
  int unsigned n_fetch = 0;

  // fault bookkeeping: fetch index of the faulty word and whether flagged
  int fault_idx = -1;
  bit fault_seen = 0;
  int det [4], tot [4];
  int flagged_by_fetch [int];

  initial begin
    #100ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("%0t FAIL %s", $time, s);
  endtask

  // compare outputs every cycle with what the model scheduled for it
  always @(negedge clk) if (rst_n) begin
    bit v;
    v = exp_v.exists(cycle) ? exp_v[cycle] : 0;
    checks++;
    if (chk_valid !== v) fail($sformatf("chk_valid %0b exp %0b", chk_valid, v));
    if (v) begin
      checks++;
      if (chk_fault !== exp_f[cycle]) fail($sformatf("chk_fault %0b exp %0b", chk_fault, exp_f[cycle]));
      if (!exp_f[cycle] && !learn && match_addr !== AW'(exp_a[cycle]))
        fail($sformatf("match_addr %0d exp %0d", match_addr, exp_a[cycle]));
      exp_v.delete(cycle); exp_f.delete(cycle); exp_a.delete(cycle);
    end
  end

  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [WL*XLEN-1:0] pack(word_t q[$]);
    logic [WL*XLEN-1:0] p;
    for (int i = 0; i < WL; i++) p[i*XLEN +: XLEN] = q[i];
    return p;
  endfunction

  task automatic do_restart();
    @(negedge clk); restart = 1; @(posedge clk); #1 restart = 0;
    win.delete(); n_fetch = 0;
  endtask

  // fetch one instruction (with random idle cycles before it)
  task automatic fetch(word_t w, bit is_learn, bit faulty, int fm);
    logic [WL*XLEN-1:0] key;
    @(negedge clk);
    while ($urandom_range(3) == 0) begin fetch_valid = 0; @(negedge clk); end
    fetch_valid = 1; fetch_instr = w;
    @(posedge clk); #1 fetch_valid = 0;
    if (faulty) begin fault_idx = int'(n_fetch); fault_seen = 0; end
    win.push_back(w); if (win.size() > WL) void'(win.pop_front());
    n_fetch++;
    if (n_fetch >= WL && ((n_fetch - WL) % SL) == 0) begin
      key = pack(win);
      exp_v[cycle + 1] = 1;
      if (is_learn) begin
        exp_f[cycle + 1] = 0; exp_a[cycle + 1] = 0;
        if (!tbl.exists(key)) begin
          if (n_tbl < DEPTH) begin tbl[key] = n_tbl; n_tbl++; end
          else model_ovf = 1;
        end
      end else begin
        exp_f[cycle + 1] = !tbl.exists(key);
        exp_a[cycle + 1] = tbl.exists(key) ? int'(tbl[key]) : 0;
        if (fault_idx >= 0 && int'(n_fetch) - 1 - fault_idx < WL && !tbl.exists(key))
          fault_seen = 1;
      end
    end
  endtask

  initial begin
    rsa_trace tr;
    word_t q[$], pool[$];
    int n_alarms;
    tr = new(12);
    n_alarms = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // ---- design phase ----
    learn = 1;
    for (int r = 0; r < LEARN_RUNS; r++) begin
      q.delete(); tr.run(q);
      do_restart();
      foreach (q[i]) begin fetch(q[i], 1, 0, 0); pool.push_back(q[i]); end
    end
    repeat (4) @(negedge clk);
    $display("learned %0d different windows", n_tbl);
    checks++; if (int'(entries) != int'(n_tbl)) fail($sformatf("entries %0d exp %0d", entries, n_tbl));
    checks++; if (overflow !== model_ovf) fail("overflow flag");
    checks++; if (!s_overflow || int'(s_entries) != SMALL) fail("small table did not overflow");
    checks++; if (alarm !== 0) fail("alarm during design phase");

    // ---- software load of one extra row: a window that never occurs ----
    @(negedge clk); tbl_wr_en = 1; tbl_wr_addr = AW'(n_tbl);
    tbl_wr_data = {5{32'h0000_0013}};            // five nops
    @(posedge clk); #1 tbl_wr_en = 0;
    tbl[{5{32'h0000_0013}}] = n_tbl; n_tbl++;
    learn = 0;
    do_restart();
    for (int i = 0; i < 6; i++) fetch(32'h0000_0013, 0, 0, 0);
    repeat (3) @(negedge clk);
    checks++; if (alarm !== 0) fail("software-loaded row not found");

    // ---- evaluation phase with one fault per run ----
    for (int r = 0; r < EVAL_RUNS; r++) begin
      int fm, pos;
      fm = r % 4;
      q.delete(); tr.run(q);
      do pos = $urandom_range(q.size() - 1);
      while (fm == FM_BR_OPP && !is_branch(q[pos]));
      do_restart();
      fault_idx = -1;
      foreach (q[i]) begin
        word_t w;
        w = (i == pos) ? inject(fault_model_e'(fm), q[i], pool) : q[i];
        fetch(w, 0, i == pos, fm);
      end
      repeat (3) @(negedge clk);
      tot[fm]++; det[fm] += int'(fault_seen);
      n_alarms += int'(alarm);
      @(negedge clk); alarm_clr = 1; @(negedge clk); alarm_clr = 0;
      checks++; if (alarm !== 0) fail("alarm_clr did not clear the alarm");
    end
    $display("runs with an alarm: %0d of %0d", n_alarms, EVAL_RUNS);
    $display("detected faulty runs: bit %0d/%0d byte %0d/%0d br-opp %0d/%0d ins2ins %0d/%0d",
             det[0], tot[0], det[1], tot[1], det[2], tot[2], det[3], tot[3]);
    checks++; if (det[FM_BR_OPP] != tot[FM_BR_OPP]) fail("a branch-to-opposite fault went undetected");
    checks++; if (n_alarms == 0) fail("no alarm raised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
