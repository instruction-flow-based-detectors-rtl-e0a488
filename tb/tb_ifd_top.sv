// tb_ifd_top: end-to-end test of the detector pair at its default size
// (WL=5, SL=1, 213-row CAM, 512-bit Bloom filter), no parameter overridden.
//
// Sequence: design phase on fault-free square-and-multiply runs; fault-free
// evaluation runs interrupted by "interrupt handler" code fetched while the
// detectors are paused; runs with one injected fault of each model; software
// load of a CAM row and of Bloom filter bits; the external RNN alarm; and a
// design phase on random code that overflows the CAM. Models of both
// detectors predict every check result two cycles after the fetch, and the
// RNN feature stream is checked instruction by instruction. Each mechanism
// is counted and must occur at least once.
module tb_ifd_top;
  import tb_pkg::*;
  localparam int WL = 5, XLEN = 32, DEPTH = 213, M = 512;
  localparam int AW = 8, CNTW = 8, IW = 9;

  logic clk = 0, rst_n = 0, enable = 1, restart = 0, learn = 0, alarm_clr = 0;
  logic fetch_valid = 0;
  logic [XLEN-1:0] fetch_instr = '0;
  logic cam_clear = 0, cam_wr_en = 0;
  logic [AW-1:0] cam_wr_addr = '0;
  logic [WL*XLEN-1:0] cam_wr_data = '0;
  logic bf_clear = 0, bf_wr_en = 0, bf_wr_bit = 0;
  logic [IW-1:0] bf_wr_addr = '0;
  logic cam_chk_valid, cam_fault, cam_alarm, cam_overflow;
  logic [AW-1:0] cam_match_addr;
  logic [CNTW-1:0] cam_entries;
  logic bf_chk_valid, bf_fault, bf_alarm;
  logic [15:0] bf_new_windows;
  logic rnn_feat_valid, rnn_alarm = 0, irq;
  ifd_pkg::rnn_feat_t rnn_feat;

  ifd_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  bit exp_v [int];
  bit exp_cf [int];
  bit exp_bf [int];
  logic [10:0] exp_feat [int];

  int unsigned tbl [logic [WL*XLEN-1:0]];
  int unsigned n_tbl = 0;
  bit model_ovf = 0;
  bit map [M];
  word_t win [$];
  int unsigned n_fetch = 0;

  // mechanism counters
  int n_learn_new = 0, n_cam_hit = 0, n_cam_miss = 0, n_bf_miss = 0, n_bf_fp = 0,
      n_pause_fetch = 0, n_restart = 0, n_overflow = 0, n_sw_load = 0,
      n_alarm_clr = 0, n_rnn_irq = 0, n_feat = 0, n_idle = 0;

  initial begin
    #200ms; failures++;
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
    if (cam_chk_valid !== v || bf_chk_valid !== v) fail("chk_valid timing");
    if (v) begin
      checks += 2;
      if (cam_fault !== exp_cf[cycle]) fail($sformatf("cam_fault %0b exp %0b", cam_fault, exp_cf[cycle]));
      if (bf_fault !== exp_bf[cycle]) fail($sformatf("bf_fault %0b exp %0b", bf_fault, exp_bf[cycle]));
      exp_v.delete(cycle); exp_cf.delete(cycle); exp_bf.delete(cycle);
    end
    checks++;
    if (rnn_feat_valid !== exp_feat.exists(cycle)) fail("rnn_feat_valid");
    else if (rnn_feat_valid) begin
      checks++; n_feat++;
      if (rnn_feat !== exp_feat[cycle]) fail("rnn_feat value");
      exp_feat.delete(cycle);
    end
  end

  always @(posedge clk) cycle <= cycle + 1;

  function automatic logic [WL*XLEN-1:0] pack(word_t q[$]);
    logic [WL*XLEN-1:0] p;
    for (int i = 0; i < WL; i++) p[i*XLEN +: XLEN] = q[i];
    return p;
  endfunction

  function automatic void indices(word_t q[$], output int i0, output int i1);
    byte unsigned b[$];
    words_to_bytes(q, b);
    i0 = int'(fnv1a_ref(b) % M);
    i1 = int'(murmur2_ref(b, 32'h0) % M);
  endfunction

  task automatic do_restart();
    @(negedge clk); restart = 1; @(posedge clk); #1 restart = 0;
    win.delete(); n_fetch = 0; n_restart++;
  endtask

  task automatic fetch(word_t w);
    int i0, i1;
    bit mem, hit;
    logic [WL*XLEN-1:0] key;
    @(negedge clk);
    while ($urandom_range(3) == 0) begin fetch_valid = 0; n_idle++; @(negedge clk); end
    fetch_valid = 1; fetch_instr = w;
    @(posedge clk); #1 fetch_valid = 0;
    if (!enable) begin n_pause_fetch++; return; end
    exp_feat[cycle] = {w[30], w[14:12], w[6:0]};
    win.push_back(w); if (win.size() > WL) void'(win.pop_front());
    n_fetch++;
    if (n_fetch < WL) return;
    key = pack(win);
    indices(win, i0, i1);
    mem = map[i0] && map[i1];
    hit = tbl.exists(key);
    exp_v[cycle + 1] = 1;
    if (learn) begin
      exp_cf[cycle + 1] = 0; exp_bf[cycle + 1] = 0;
      if (!hit) begin
        if (n_tbl < DEPTH) begin tbl[key] = n_tbl; n_tbl++; n_learn_new++; end
        else model_ovf = 1;
      end
      map[i0] = 1; map[i1] = 1;
    end else begin
      exp_cf[cycle + 1] = !hit; exp_bf[cycle + 1] = !mem;
      n_cam_hit += int'(hit); n_cam_miss += int'(!hit);
      n_bf_miss += int'(!mem); n_bf_fp += int'(!hit && mem);
    end
  endtask

  task automatic expect_alarms(bit c, bit b, string what);
    repeat (3) @(negedge clk);
    checks += 3;
    if (cam_alarm !== c) fail($sformatf("%s: cam_alarm %0b exp %0b", what, cam_alarm, c));
    if (bf_alarm !== b)  fail($sformatf("%s: bf_alarm %0b exp %0b", what, bf_alarm, b));
    if (irq !== (c || b)) fail($sformatf("%s: irq", what));
    @(negedge clk); alarm_clr = 1; @(negedge clk); alarm_clr = 0;
    if (c || b) n_alarm_clr++;
    checks++; if (irq !== 0) fail("alarm_clr");
  endtask

  initial begin
    rsa_trace tr;
    word_t q[$], pool[$];
    int fm, pos, i0, i1, base_miss, base_bf;
    word_t w;
    tr = new(12);
    foreach (map[i]) map[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;

    // ---- design phase ----
    learn = 1;
    for (int r = 0; r < 30; r++) begin
      q.delete(); tr.run(q); do_restart();
      foreach (q[i]) begin fetch(q[i]); pool.push_back(q[i]); end
    end
    repeat (3) @(negedge clk);
    checks++; if (int'(cam_entries) != int'(n_tbl)) fail("cam_entries after learning");
    $display("design phase: %0d different windows stored", n_tbl);
    learn = 0;

    // ---- fault-free runs, paused by interrupts ----
    for (int r = 0; r < 6; r++) begin
      base_miss = n_cam_miss; base_bf = n_bf_miss;
      q.delete(); tr.run(q); do_restart();
      pos = $urandom_range(10, q.size() - 10);
      foreach (q[i]) begin
        if (i == pos) begin
          @(negedge clk); enable = 0;
          repeat (20) fetch($urandom);   // interrupt handler, not checked
          @(negedge clk); enable = 1;
        end
        fetch(q[i]);
      end
      expect_alarms(n_cam_miss != base_miss, n_bf_miss != base_bf, "fault-free run");
    end

    // ---- one fault per run, every fault model ----
    for (int r = 0; r < 24; r++) begin
      fm = r % 4;
      base_miss = n_cam_miss; base_bf = n_bf_miss;
      q.delete(); tr.run(q); do_restart();
      do pos = $urandom_range(q.size() - 1); while (fm == FM_BR_OPP && !is_branch(q[pos]));
      foreach (q[i]) begin
        w = (i == pos) ? inject(fault_model_e'(fm), q[i], pool) : q[i];
        fetch(w);
      end
      expect_alarms(n_cam_miss != base_miss, n_bf_miss != base_bf, "faulty run");
    end

    // ---- software load: the five-nop window into both detectors ----
    for (int k = 0; k < 5; k++) q[k] = 32'h0000_0013;
    q = q[0:4];
    @(negedge clk); cam_wr_en = 1; cam_wr_addr = AW'(n_tbl); cam_wr_data = pack(q);
    @(negedge clk); cam_wr_en = 0;
    tbl[pack(q)] = n_tbl; n_tbl++;
    indices(q, i0, i1);
    @(negedge clk); bf_wr_en = 1; bf_wr_bit = 1; bf_wr_addr = IW'(i0);
    @(negedge clk); bf_wr_addr = IW'(i1);
    @(negedge clk); bf_wr_en = 0;
    map[i0] = 1; map[i1] = 1;
    n_sw_load++;
    do_restart();
    for (int i = 0; i < 8; i++) fetch(32'h0000_0013);
    expect_alarms(0, 0, "software-loaded window");

    // ---- external RNN alarm reaches irq ----
    @(negedge clk); rnn_alarm = 1; #1;
    checks++; if (irq !== 1) fail("rnn_alarm does not raise irq"); else n_rnn_irq++;
    @(negedge clk); rnn_alarm = 0;

    // ---- design phase on random code until the CAM is full ----
    learn = 1; do_restart();
    for (int i = 0; i < 300; i++) fetch($urandom);
    repeat (3) @(negedge clk);
    checks += 2;
    if (cam_overflow !== model_ovf || !model_ovf) fail("cam_overflow");
    if (int'(cam_entries) != DEPTH) fail("cam_entries when full");
    n_overflow += int'(cam_overflow);
    @(negedge clk); cam_clear = 1; bf_clear = 1; @(negedge clk); cam_clear = 0; bf_clear = 0;
    checks += 3;
    if (cam_entries !== 0 || cam_overflow !== 0 || bf_new_windows !== 0) fail("clear");
    learn = 0;

    $display("mechanisms: learn_new=%0d cam_hit=%0d cam_miss=%0d bf_miss=%0d bf_false_pos=%0d",
             n_learn_new, n_cam_hit, n_cam_miss, n_bf_miss, n_bf_fp);
    $display("            paused_fetches=%0d idle_cycles=%0d restarts=%0d overflow=%0d sw_load=%0d alarm_clr=%0d rnn_irq=%0d rnn_feat=%0d",
             n_pause_fetch, n_idle, n_restart, n_overflow, n_sw_load, n_alarm_clr, n_rnn_irq, n_feat);
    if (n_learn_new == 0) fail("no learn insert");
    if (n_cam_hit == 0) fail("no CAM hit");
    if (n_cam_miss == 0) fail("no CAM miss");
    if (n_bf_miss == 0) fail("no BF miss");
    if (n_pause_fetch == 0) fail("no paused fetch");
    if (n_idle == 0) fail("no idle cycle");
    if (n_restart == 0) fail("no restart");
    if (n_overflow == 0) fail("no overflow");
    if (n_sw_load == 0) fail("no software load");
    if (n_alarm_clr == 0) fail("no alarm clear");
    if (n_rnn_irq == 0) fail("no RNN irq");
    if (n_feat == 0) fail("no RNN feature");
    checks += 12;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
