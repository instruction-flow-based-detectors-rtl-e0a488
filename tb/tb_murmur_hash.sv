// tb_murmur_hash: the 20-byte MurmurHash2 (seed 0) against fixed vectors
// worked out independently and against a byte-loop reference for random windows.
module tb_murmur_hash;
  import tb_pkg::*;
  logic [159:0] data;
  logic [31:0]  hash;
  int checks = 0, failures = 0;

  murmur_hash #(.NWORDS(5)) dut (.data, .hash);

  task automatic chk(logic [31:0] exp);
    #1; checks++;
    if (hash !== exp) begin
      failures++; $display("murmur(%h) = %h expected %h", data, hash, exp);
    end
  endtask

  initial begin
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    word_t w[$];
    byte unsigned b[$];
    data = '0;                                                             chk(32'h35715cc7);
    data = {32'h00008067, 32'hfe069ee3, 32'h00b50633, 32'h00a00093, 32'h00000013}; chk(32'hf317fc20);
    data = '1;                                                             chk(32'hde74e808);
    data = {32'h00000001, 32'hdeadbeef, 32'h0badf00d, 32'h9abcdef0, 32'h12345678}; chk(32'hdea61c8a);
    for (int n = 0; n < 2000; n++) begin
      w.delete();
      for (int i = 0; i < 5; i++) w.push_back($urandom);
      for (int i = 0; i < 5; i++) data[32*i +: 32] = w[i];
      words_to_bytes(w, b);
      chk(murmur2_ref(b, 32'h0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
