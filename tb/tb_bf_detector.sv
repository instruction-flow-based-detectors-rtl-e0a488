// tb_bf_detector: Bloom filter detector at its full size (WL=5, SL=1,
// m=512, FNV + Murmur) learns the windows of fault-free square-and-multiply
// runs, then checks fresh runs with one injected fault each (single bit,
// single byte, branch to opposite, instruction to instruction). A model made
// of the reference hashes and a bit array predicts every check result, which
// must appear two cycles after the fetch completing the window. The test
// also checks that no learned window is ever rejected, loads one bit by
// software, and exercises the sticky alarm and its clear.
module tb_bf_detector;
  import tb_pkg::*;
  localparam int WL = 5, SL = 1, XLEN = 32, M = 512, IW = 9;
  localparam int LEARN_RUNS = 40, EVAL_RUNS = 120;

  logic clk = 0, rst_n = 0, enable = 1, restart = 0, learn = 0;
  logic fetch_valid = 0, bm_clear = 0, bm_wr_en = 0, bm_wr_bit = 0, alarm_clr = 0;
  logic [XLEN-1:0] fetch_instr = '0;
  logic [IW-1:0] bm_wr_addr = '0;
  logic filled, chk_valid, chk_fault, alarm;
  logic [15:0] new_windows;

  bf_detector #(.WL(WL), .SL(SL), .XLEN(XLEN), .M(M)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  bit exp_v [int];
  bit exp_f [int];

  bit map [M];
  bit learned [logic [WL*XLEN-1:0]];
  int n_new = 0;
  word_t win [$];
  int unsigned n_fetch = 0;
  int fault_idx = -1;
  bit fault_seen = 0;
  int det [4], tot [4];
  int learned_rejected = 0, unseen = 0, unseen_accepted = 0;

  initial begin
    #100ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic fail(string s);
    failures++;
    if (failures < 10) $display("%0t FAIL %s", $time, s);
  endtask

  always @(negedge clk) if (rst_n) begin
    bit v;
    v = exp_v.exists(cycle) ? exp_v[cycle] : 0;
    checks++;
    if (chk_valid !== v) fail($sformatf("chk_valid %0b exp %0b", chk_valid, v));
    if (v) begin
      checks++;
      if (chk_fault !== exp_f[cycle]) fail($sformatf("chk_fault %0b exp %0b", chk_fault, exp_f[cycle]));
      exp_v.delete(cycle); exp_f.delete(cycle);
    end
  end

  always @(posedge clk) cycle <= cycle + 1;

  function automatic void indices(word_t q[$], output int i0, output int i1);
    byte unsigned b[$];
    words_to_bytes(q, b);
    i0 = int'(fnv1a_ref(b) % M);
    i1 = int'(murmur2_ref(b, 32'h0) % M);
  endfunction

  function automatic logic [WL*XLEN-1:0] pack(word_t q[$]);
    logic [WL*XLEN-1:0] p;
    for (int i = 0; i < WL; i++) p[i*XLEN +: XLEN] = q[i];
    return p;
  endfunction

  task automatic do_restart();
    @(negedge clk); restart = 1; @(posedge clk); #1 restart = 0;
    win.delete(); n_fetch = 0;
  endtask

  task automatic fetch(word_t w, bit is_learn, bit faulty);
    int i0, i1;
    bit mem;
    @(negedge clk);
    while ($urandom_range(3) == 0) begin fetch_valid = 0; @(negedge clk); end
    fetch_valid = 1; fetch_instr = w;
    @(posedge clk); #1 fetch_valid = 0;
    if (faulty) begin fault_idx = int'(n_fetch); fault_seen = 0; end
    win.push_back(w); if (win.size() > WL) void'(win.pop_front());
    n_fetch++;
    if (n_fetch >= WL && ((n_fetch - WL) % SL) == 0) begin
      indices(win, i0, i1);
      mem = map[i0] && map[i1];
      exp_v[cycle + 1] = 1;
      if (is_learn) begin
        exp_f[cycle + 1] = 0;
        if (!mem) n_new++;
        map[i0] = 1; map[i1] = 1;
        learned[pack(win)] = 1;
      end else begin
        exp_f[cycle + 1] = !mem;
        if (learned.exists(pack(win))) learned_rejected += int'(!mem);
        else begin unseen++; unseen_accepted += int'(mem); end
        if (fault_idx >= 0 && int'(n_fetch) - 1 - fault_idx < WL && !mem) fault_seen = 1;
      end
    end
  endtask

  initial begin
    rsa_trace tr;
    word_t q[$], pool[$];
    int n_alarms, fm, pos, nset, i0, i1;
    word_t w;
    tr = new(12);
    n_alarms = 0;
    foreach (map[i]) map[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    learn = 1;
    for (int r = 0; r < LEARN_RUNS; r++) begin
      q.delete(); tr.run(q);
      do_restart();
      foreach (q[i]) begin fetch(q[i], 1, 0); pool.push_back(q[i]); end
    end
    repeat (4) @(negedge clk);
    nset = 0; foreach (map[i]) nset += int'(map[i]);
    $display("learned %0d different windows, %0d of %0d bits set", learned.num(), nset, M);
    checks++; if (int'(new_windows) != n_new) fail($sformatf("new_windows %0d exp %0d", new_windows, n_new));
    checks++; if (alarm !== 0) fail("alarm during design phase");

    // software sets the bits of the five-nop window, which never occurs
    learn = 0;
    for (int k = 0; k < 5; k++) q[k] = 32'h0000_0013;
    q = q[0:4];
    indices(q, i0, i1);
    @(negedge clk); bm_wr_en = 1; bm_wr_bit = 1; bm_wr_addr = IW'(i0);
    @(negedge clk); bm_wr_addr = IW'(i1);
    @(negedge clk); bm_wr_en = 0;
    map[i0] = 1; map[i1] = 1;
    do_restart();
    for (int i = 0; i < 6; i++) fetch(32'h0000_0013, 0, 0);
    repeat (3) @(negedge clk);
    checks++; if (alarm !== 0) fail("software-loaded window rejected");

    for (int r = 0; r < EVAL_RUNS; r++) begin
      fm = r % 4;
      q.delete(); tr.run(q);
      do pos = $urandom_range(q.size() - 1);
      while (fm == FM_BR_OPP && !is_branch(q[pos]));
      do_restart();
      fault_idx = -1;
      foreach (q[i]) begin
        w = (i == pos) ? inject(fault_model_e'(fm), q[i], pool) : q[i];
        fetch(w, 0, i == pos);
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
    $display("unseen windows %0d, accepted by the filter (false positives) %0d", unseen, unseen_accepted);
    checks++; if (learned_rejected != 0) fail("a learned window was rejected");
    checks++; if (n_alarms == 0) fail("no alarm raised");
    // clear empties the map: the next window must be rejected
    @(negedge clk); bm_clear = 1; @(negedge clk); bm_clear = 0;
    foreach (map[i]) map[i] = 0;
    do_restart();
    for (int i = 0; i < 6; i++) fetch(32'h0000_0013, 0, 0);
    repeat (3) @(negedge clk);
    checks++; if (alarm !== 1) fail("cleared map still accepted a window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
