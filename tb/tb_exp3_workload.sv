// tb_exp3_workload: detector evaluation workload on the full-size top.
//
// For two programs, a plain square-and-multiply decryption and a CRT
// decryption (traces from tb_pkg, 12-bit keys), the test
//   1. clears both detectors and learns from fault-free runs (design phase);
//   2. runs fresh fault-free decryptions and counts false alarms;
//   3. injects, in the instruction stream, faults of each model (single bit,
//      single byte, branch to opposite, instruction to instruction I and II),
//      one fault per run (f = 1) or two to four faults (f > 1), and reports
//      the share of faulty runs each detector flags;
//   4. for the CRT program, corrupts one CAM row and one bit of the Bloom
//      filter map (an attack on the detector itself) and repeats fault-free
//      and faulty runs.
// Models of both detectors predict every check result, two cycles after the
// fetch, and the sticky alarms after each run; any difference is a failure.
module tb_exp3_workload;
  import tb_pkg::*;
  localparam int WL = 5, XLEN = 32, DEPTH = 213, M = 512;
  localparam int AW = 8, CNTW = 8, IW = 9;
  localparam int LEARN_RUNS = 40, FF_RUNS = 20, FAULT_RUNS = 12;

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

  int unsigned tbl [logic [WL*XLEN-1:0]];
  int unsigned n_tbl = 0;
  bit map [M];
  word_t win [$];
  int unsigned n_fetch = 0;
  bit run_cam_miss, run_bf_miss;

  initial begin
    #900ms; failures++;
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
    win.delete(); n_fetch = 0; run_cam_miss = 0; run_bf_miss = 0;
  endtask

  task automatic fetch(word_t w);
    int i0, i1;
    bit mem, hit;
    logic [WL*XLEN-1:0] key;
    @(negedge clk);
    if ($urandom_range(7) == 0) @(negedge clk);
    fetch_valid = 1; fetch_instr = w;
    @(posedge clk); #1 fetch_valid = 0;
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
      if (!hit && n_tbl < DEPTH) begin tbl[key] = n_tbl; n_tbl++; end
      map[i0] = 1; map[i1] = 1;
    end else begin
      exp_cf[cycle + 1] = !hit; exp_bf[cycle + 1] = !mem;
      run_cam_miss |= !hit; run_bf_miss |= !mem;
    end
  endtask

  // end of a run: compare the sticky alarms with the model, then clear them
  task automatic end_run(output bit c, output bit b);
    repeat (3) @(negedge clk);
    checks += 2;
    if (cam_alarm !== run_cam_miss) fail("cam_alarm after run");
    if (bf_alarm !== run_bf_miss) fail("bf_alarm after run");
    c = cam_alarm; b = bf_alarm;
    @(negedge clk); alarm_clr = 1; @(negedge clk); alarm_clr = 0;
  endtask

  rsa_trace tr;
  word_t pool[$];

  task automatic gen(bit crt, ref word_t q[$]);
    q.delete();
    if (crt) tr.run_crt(q); else tr.run(q);
  endtask

  // nf faults of model fm at distinct random positions
  task automatic faulty_run(bit crt, int fm, int nf, output bit c, output bit b);
    word_t q[$];
    int pos[$];
    int p;
    gen(crt, q);
    while (pos.size() < nf) begin
      p = $urandom_range(q.size() - 1);
      if (fm == FM_BR_OPP && !is_branch(q[p])) continue;
      if (p inside {pos}) continue;
      pos.push_back(p);
    end
    foreach (pos[k]) q[pos[k]] = inject(fault_model_e'(fm), q[pos[k]], pool);
    do_restart();
    foreach (q[i]) fetch(q[i]);
    end_run(c, b);
  endtask

  task automatic fault_free(bit crt, int runs, output int fa_c, output int fa_b);
    word_t q[$];
    bit c, b;
    fa_c = 0; fa_b = 0;
    for (int r = 0; r < runs; r++) begin
      gen(crt, q); do_restart();
      foreach (q[i]) fetch(q[i]);
      end_run(c, b);
      fa_c += int'(c); fa_b += int'(b);
    end
  endtask

  task automatic fault_table(bit crt, output int total_c);
    string names [5] = '{"bit", "byte", "br-opp", "ins2ins-II", "ins2ins-I"};
    int order [5] = '{0, 1, 2, 4, 3};
    int dc, db, fm;
    bit c, b;
    total_c = 0;
    for (int k = 0; k < 5; k++) begin
      fm = order[k];
      for (int multi = 0; multi < 2; multi++) begin
        dc = 0; db = 0;
        for (int r = 0; r < FAULT_RUNS; r++) begin
          faulty_run(crt, fm, multi ? $urandom_range(2, 4) : 1, c, b);
          dc += int'(c); db += int'(b);
        end
        total_c += dc;
        $display("  %-10s f%s1  CAM %0d/%0d  BF %0d/%0d", names[fm], multi ? ">" : "=",
                 dc, FAULT_RUNS, db, FAULT_RUNS);
      end
    end
  endtask

  initial begin
    word_t q[$];
    int fa_c, fa_b, tot, row, bitn, i0;
    logic [WL*XLEN-1:0] victim, corrupted;
    tr = new(12);
    repeat (3) @(posedge clk); rst_n = 1;

    for (int crt = 0; crt < 2; crt++) begin
      $display("==== %s decryption ====", crt ? "CRT" : "plain");
      @(negedge clk); cam_clear = 1; bf_clear = 1; @(negedge clk); cam_clear = 0; bf_clear = 0;
      tbl.delete(); n_tbl = 0; foreach (map[i]) map[i] = 0;
      pool.delete();
      learn = 1;
      for (int r = 0; r < LEARN_RUNS; r++) begin
        gen(crt, q); do_restart();
        foreach (q[i]) begin fetch(q[i]); pool.push_back(q[i]); end
      end
      repeat (3) @(negedge clk);
      learn = 0;
      checks += 2;
      if (int'(cam_entries) != int'(n_tbl)) fail("cam_entries");
      if (cam_overflow) fail("the program does not fit the CAM");
      $display("  design phase: %0d different windows (CAM rows %0d of %0d)", n_tbl, cam_entries, DEPTH);

      fault_free(crt, FF_RUNS, fa_c, fa_b);
      $display("  fault-free runs with an alarm: CAM %0d/%0d  BF %0d/%0d", fa_c, FF_RUNS, fa_b, FF_RUNS);
      fault_table(crt, tot);
      checks++; if (tot == 0) fail("no faulty run detected");

      if (crt) begin
        // attack on the detector: one bit of one CAM row, one bit of the map
        row = $urandom_range(n_tbl - 1);
        foreach (tbl[k]) if (tbl[k] == row) victim = k;
        corrupted = victim; bitn = $urandom_range(WL * XLEN - 1); corrupted[bitn] ^= 1'b1;
        @(negedge clk); cam_wr_en = 1; cam_wr_addr = AW'(row); cam_wr_data = corrupted;
        @(negedge clk); cam_wr_en = 0;
        tbl.delete(victim); tbl[corrupted] = row;
        i0 = $urandom_range(M - 1);
        @(negedge clk); bf_wr_en = 1; bf_wr_addr = IW'(i0); bf_wr_bit = !map[i0];
        @(negedge clk); bf_wr_en = 0;
        map[i0] = !map[i0];
        $display("  -- detector attacked: CAM row %0d bit %0d, map bit %0d flipped --", row, bitn, i0);
        fault_free(crt, FF_RUNS, fa_c, fa_b);
        $display("  fault-free runs with an alarm: CAM %0d/%0d  BF %0d/%0d", fa_c, FF_RUNS, fa_b, FF_RUNS);
        fault_table(crt, tot);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
