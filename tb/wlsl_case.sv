// wlsl_case: one (WL, SL) configuration of both detectors, driven by its own
// stimulus and checked against models; used by tb_wlsl_sweep.
//
// The case learns 20 fault-free square-and-multiply runs, then runs 20 runs
// with one injected fault each. Set and bit-array models predict every check
// result two cycles after its fetch, and the number of checks must be one
// per SL fetches once the window has filled. Results are reported on ports.
module wlsl_case #(
  parameter int WL = 5,
  parameter int SL = 1
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures,
  output int   windows,
  output int   detected_cam,
  output int   detected_bf
);
  import tb_pkg::*;
  localparam int XLEN = 32, DEPTH = 213, M = 512, IW = 9;
  localparam int AW = $clog2(DEPTH), CNTW = $clog2(DEPTH + 1);

  logic rst_n = 0, restart = 0, learn = 0, fetch_valid = 0;
  logic [XLEN-1:0] fetch_instr = '0;
  logic c_filled, c_valid, c_fault, c_alarm, c_ovf;
  logic [AW-1:0] c_addr;
  logic [CNTW-1:0] c_entries;
  logic b_filled, b_valid, b_fault, b_alarm;
  logic [15:0] b_new;

  cam_detector #(.WL(WL), .SL(SL), .XLEN(XLEN), .DEPTH(DEPTH)) u_cam (
    .clk, .rst_n, .enable(1'b1), .restart, .learn, .fetch_valid, .fetch_instr,
    .tbl_clear(1'b0), .tbl_wr_en(1'b0), .tbl_wr_addr('0), .tbl_wr_data('0), .alarm_clr(restart),
    .filled(c_filled), .chk_valid(c_valid), .chk_fault(c_fault), .match_addr(c_addr),
    .alarm(c_alarm), .entries(c_entries), .overflow(c_ovf));

  bf_detector #(.WL(WL), .SL(SL), .XLEN(XLEN), .M(M)) u_bf (
    .clk, .rst_n, .enable(1'b1), .restart, .learn, .fetch_valid, .fetch_instr,
    .bm_clear(1'b0), .bm_wr_en(1'b0), .bm_wr_addr('0), .bm_wr_bit(1'b0), .alarm_clr(restart),
    .filled(b_filled), .chk_valid(b_valid), .chk_fault(b_fault), .alarm(b_alarm),
    .new_windows(b_new));

  int cycle = 0;
  bit exp_v [int];
  bit exp_cf [int];
  bit exp_bf [int];
  bit tbl [logic [WL*XLEN-1:0]];
  bit map [M];
  word_t win [$];
  int n_fetch = 0, n_chk = 0, n_exp_chk = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic fail(string s);
    failures++;
    if (failures < 5) $display("WL=%0d SL=%0d: %s", WL, SL, s);
  endtask

  always @(negedge clk) if (rst_n) begin
    bit v;
    v = exp_v.exists(cycle) ? exp_v[cycle] : 0;
    checks++;
    if (c_valid !== v || b_valid !== v) fail("chk_valid timing");
    n_chk += int'(c_valid);
    if (v) begin
      checks += 2;
      if (c_fault !== exp_cf[cycle]) fail("CAM result");
      if (b_fault !== exp_bf[cycle]) fail("BF result");
      exp_v.delete(cycle); exp_cf.delete(cycle); exp_bf.delete(cycle);
    end
  end

  function automatic logic [WL*XLEN-1:0] pack(word_t q[$]);
    logic [WL*XLEN-1:0] p;
    for (int i = 0; i < WL; i++) p[i*XLEN +: XLEN] = q[i];
    return p;
  endfunction

  task automatic do_restart();
    @(negedge clk); restart = 1; @(posedge clk); #1 restart = 0;
    win.delete(); n_fetch = 0;
  endtask

  task automatic fetch(word_t w);
    byte unsigned b[$];
    int i0, i1;
    logic [WL*XLEN-1:0] key;
    @(negedge clk);
    fetch_valid = 1; fetch_instr = w;
    @(posedge clk); #1 fetch_valid = 0;
    win.push_back(w); if (win.size() > WL) void'(win.pop_front());
    n_fetch++;
    if (n_fetch < WL || ((n_fetch - WL) % SL) != 0) return;
    n_exp_chk++;
    key = pack(win);
    words_to_bytes(win, b);
    i0 = int'(fnv1a_ref(b) % M);
    i1 = int'(murmur2_ref(b, 32'h0) % M);
    exp_v[cycle + 1] = 1;
    if (learn) begin
      exp_cf[cycle + 1] = 0; exp_bf[cycle + 1] = 0;
      if (tbl.num() < DEPTH) tbl[key] = 1;
      map[i0] = 1; map[i1] = 1;
    end else begin
      exp_cf[cycle + 1] = !tbl.exists(key);
      exp_bf[cycle + 1] = !(map[i0] && map[i1]);
    end
  endtask

  initial begin
    rsa_trace tr;
    word_t q[$], pool[$];
    int pos;
    checks = 0; failures = 0; done = 0; detected_cam = 0; detected_bf = 0;
    tr = new(8);
    foreach (map[i]) map[i] = 0;
    wait (start);
    repeat (2) @(posedge clk); rst_n = 1;
    learn = 1;
    for (int r = 0; r < 20; r++) begin
      q.delete(); tr.run(q); do_restart();
      foreach (q[i]) begin fetch(q[i]); pool.push_back(q[i]); end
    end
    learn = 0;
    for (int r = 0; r < 20; r++) begin
      q.delete(); tr.run(q);
      pos = $urandom_range(q.size() - 1);
      q[pos] = inject(fault_model_e'(r % 5), q[pos], pool);
      do_restart();
      foreach (q[i]) fetch(q[i]);
      repeat (3) @(negedge clk);
      detected_cam += int'(c_alarm); detected_bf += int'(b_alarm);
    end
    repeat (3) @(negedge clk);
    checks++;
    if (n_chk != n_exp_chk) fail($sformatf("%0d checks made, %0d expected", n_chk, n_exp_chk));
    windows = tbl.num();
    done = 1;
  end
endmodule
