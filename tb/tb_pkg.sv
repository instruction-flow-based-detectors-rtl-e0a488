// tb_pkg: reference models and stimulus shared by the detector testbenches.
//
// - Reference FNV-1a and MurmurHash2 written over a byte queue, independently
//   of the unrolled RTL.
// - RV32I instruction encoders.
// - rsa_trace: a generator of the instruction stream an RV32I core fetches
//   while it runs a square-and-multiply modular exponentiation: a loop over
//   the key bits that always squares and multiplies when the key bit is 1,
//   with a shift-and-add modular multiply subroutine whose inner branches and
//   reduction loop depend on the data (taken at random here). Different keys
//   and data give different valid instruction flows. run() is a plain
//   exponentiation; run_crt() is a CRT decryption: two half-length
//   exponentiations, two modular inverses (extended Euclid with a
//   subtract-loop division) and the recombination.
// - Fault models applied to one fetched instruction: single bit, single byte,
//   branch to opposite branch (funct3 bit 0, i.e. instruction bit 12) and
//   instruction to instruction (replaced by another instruction word;
//   model I keeps branches branches and non-branches non-branches, model II
//   is unconstrained).
package tb_pkg;

  typedef logic [31:0] word_t;

  // ---------------- reference hashes -------------------------------------
  function automatic logic [31:0] fnv1a_ref(byte unsigned b[$]);
    logic [31:0] h = 32'h811c9dc5;
    foreach (b[i]) begin
      h ^= 32'(b[i]);
      h = 32'(h * 32'h01000193);
    end
    return h;
  endfunction

  function automatic logic [31:0] murmur2_ref(byte unsigned b[$], logic [31:0] seed);
    logic [31:0] m = 32'h5bd1e995;
    logic [31:0] h = seed ^ 32'(b.size());
    logic [31:0] k;
    for (int i = 0; i + 3 < b.size(); i += 4) begin
      k = {b[i+3], b[i+2], b[i+1], b[i]};
      k = 32'(k * m); k ^= k >> 24; k = 32'(k * m);
      h = 32'(h * m); h ^= k;
    end
    h ^= h >> 13; h = 32'(h * m); h ^= h >> 15;
    return h;
  endfunction

  // window given as words, word 0 first; bytes little endian
  function automatic void words_to_bytes(word_t w[$], ref byte unsigned b[$]);
    b.delete();
    foreach (w[i]) for (int j = 0; j < 4; j++) b.push_back(w[i][8*j +: 8]);
  endfunction

  // ---------------- RV32I encoders ----------------------------------------
  function automatic word_t enc_r(int f7, int rs2, int rs1, int f3, int rd, int op);
    return {7'(f7), 5'(rs2), 5'(rs1), 3'(f3), 5'(rd), 7'(op)};
  endfunction
  function automatic word_t enc_i(int imm, int rs1, int f3, int rd, int op);
    return {12'(imm), 5'(rs1), 3'(f3), 5'(rd), 7'(op)};
  endfunction
  function automatic word_t enc_s(int imm, int rs2, int rs1, int f3);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:0], 7'h23};
  endfunction
  function automatic word_t enc_b(int imm, int rs2, int rs1, int f3);
    logic [12:0] i = 13'(imm);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), 3'(f3), i[4:1], i[11], 7'h63};
  endfunction
  function automatic word_t enc_j(int imm, int rd);
    logic [20:0] i = 21'(imm);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'h6f};
  endfunction

  localparam int OP_IMM = 7'h13, OP = 7'h33, LOAD = 7'h03, JALR = 7'h67;
  localparam int ZERO = 0, RA = 1, SP = 2, T0 = 5, T1 = 6, T2 = 7, S1 = 9,
                 A0 = 10, A1 = 11, A2 = 12, A3 = 13, A4 = 14, A5 = 15, S2 = 18,
                 S3 = 19, S4 = 20, S5 = 21, T3 = 28, T4 = 29, T5 = 30;

  function automatic bit is_branch(word_t w);
    return w[6:0] == 7'h63;
  endfunction

  // ---------------- program trace -----------------------------------------
  class rsa_trace;
    int unsigned key_bits;

    function new(int unsigned key_bits = 12);
      this.key_bits = key_bits;
    endfunction

    // modular multiply a0 = a0 * a1 mod a3 by shift and add
    function automatic void mulmod(ref word_t q[$]);
      int unsigned red;
      q.push_back(enc_i(0, ZERO, 0, A2, OP_IMM));            // li   a2,0
      q.push_back(enc_i(key_bits, ZERO, 0, T3, OP_IMM));     // li   t3,B
      for (int unsigned it = 0; it < key_bits; it++) begin
        q.push_back(enc_i(1, A1, 7, T1, OP_IMM));            // andi t1,a1,1
        q.push_back(enc_b(8, ZERO, T1, 0));                  // beq  t1,x0,+8
        if ($urandom_range(1)) q.push_back(enc_r(0, A0, A2, 0, A2, OP)); // add a2,a2,a0
        q.push_back(enc_i(1, A0, 1, A0, OP_IMM));            // slli a0,a0,1
        q.push_back(enc_i(1, A1, 5, A1, OP_IMM));            // srli a1,a1,1
        q.push_back(enc_i(-1, T3, 0, T3, OP_IMM));           // addi t3,t3,-1
        q.push_back(enc_b(-24, ZERO, T3, 1));                // bne  t3,x0,-24
      end
      red = $urandom_range(2);
      for (int unsigned r = 0; r < red; r++) begin
        q.push_back(enc_b(12, A3, A2, 6));                   // bltu a2,a3,+12
        q.push_back(enc_r(32, A3, A2, 0, A2, OP));           // sub  a2,a2,a3
        q.push_back(enc_j(-8, ZERO));                        // j    -8
      end
      q.push_back(enc_b(12, A3, A2, 6));                     // bltu a2,a3,+12
      q.push_back(enc_i(0, A2, 0, A0, OP_IMM));              // mv   a0,a2
      q.push_back(enc_i(0, RA, 0, ZERO, JALR));              // ret
    endfunction

    // one decryption with a random key of key_bits bits (no CRT)
    function automatic void run(ref word_t q[$]);
      modexp(q, key_bits);
    endfunction

    // square-and-multiply exponentiation over nbits key bits
    function automatic void modexp(ref word_t q[$], input int unsigned nbits);
      q.push_back(enc_i(-16, SP, 0, SP, OP_IMM));            // addi sp,sp,-16
      q.push_back(enc_s(12, RA, SP, 2));                     // sw   ra,12(sp)
      q.push_back(enc_i(key_bits - 1, ZERO, 0, T0, OP_IMM)); // li   t0,B-1
      q.push_back(enc_i(0, S2, 0, A0, OP_IMM));              // mv   a0,s2
      for (int unsigned i = 0; i < nbits; i++) begin
        q.push_back(enc_i(0, A0, 0, A1, OP_IMM));            // mv   a1,a0
        q.push_back(enc_j(64, RA));                          // jal  ra,mulmod
        mulmod(q);
        q.push_back(enc_r(0, T0, S1, 5, T2, OP));            // srl  t2,s1,t0
        q.push_back(enc_i(1, T2, 7, T2, OP_IMM));            // andi t2,t2,1
        q.push_back(enc_b(12, ZERO, T2, 0));                 // beq  t2,x0,+12
        if ($urandom_range(1)) begin
          q.push_back(enc_i(0, S2, 0, A1, OP_IMM));          // mv   a1,s2
          q.push_back(enc_j(32, RA));                        // jal  ra,mulmod
          mulmod(q);
        end
        q.push_back(enc_i(-1, T0, 0, T0, OP_IMM));           // addi t0,t0,-1
        q.push_back(enc_b(-96, ZERO, T0, 5));                // bge  t0,x0,loop
      end
      q.push_back(enc_i(12, SP, 2, RA, LOAD));               // lw   ra,12(sp)
      q.push_back(enc_i(16, SP, 0, SP, OP_IMM));             // addi sp,sp,16
      q.push_back(enc_i(0, RA, 0, ZERO, JALR));              // ret
    endfunction

    // modular inverse by the extended Euclidean algorithm; the quotient is
    // found by repeated subtraction (data-dependent loop counts)
    function automatic void modinv(ref word_t q[$]);
      int unsigned steps = $urandom_range(2, 6);
      q.push_back(enc_i(1, ZERO, 0, A4, OP_IMM));            // li   a4,1
      q.push_back(enc_i(0, ZERO, 0, A5, OP_IMM));            // li   a5,0
      for (int unsigned s = 0; s < steps; s++) begin
        int unsigned quo = $urandom_range(0, 3);
        q.push_back(enc_i(0, ZERO, 0, T4, OP_IMM));          // li   t4,0
        for (int unsigned d = 0; d < quo; d++) begin
          q.push_back(enc_b(16, A1, A0, 6));                 // bltu a0,a1,+16
          q.push_back(enc_r(32, A1, A0, 0, A0, OP));         // sub  a0,a0,a1
          q.push_back(enc_i(1, T4, 0, T4, OP_IMM));          // addi t4,t4,1
          q.push_back(enc_j(-12, ZERO));                     // j    -12
        end
        q.push_back(enc_b(16, A1, A0, 6));                   // bltu a0,a1,+16
        q.push_back(enc_r(0, A0, ZERO, 0, T5, OP));          // mv   t5,a0
        q.push_back(enc_r(0, A1, ZERO, 0, A0, OP));          // mv   a0,a1
        q.push_back(enc_r(0, T5, ZERO, 0, A1, OP));          // mv   a1,t5
        q.push_back(enc_r(32, A5, A4, 0, T5, OP));           // sub  t5,a4,a5
        q.push_back(enc_r(0, A5, ZERO, 0, A4, OP));          // mv   a4,a5
        q.push_back(enc_r(0, T5, ZERO, 0, A5, OP));          // mv   a5,t5
        q.push_back(enc_b(-40, ZERO, A1, 1));                // bne  a1,x0,loop
      end
      q.push_back(enc_b(8, ZERO, A4, 5));                    // bge  a4,x0,+8
      if ($urandom_range(1)) q.push_back(enc_r(0, A3, A4, 0, A4, OP)); // add a4,a4,a3
      q.push_back(enc_r(0, A4, ZERO, 0, A0, OP));            // mv   a0,a4
      q.push_back(enc_i(0, RA, 0, ZERO, JALR));              // ret
    endfunction

    // one decryption with the Chinese remainder theorem: two half-size
    // exponentiations (same code, moduli p and q), two modular inverses and
    // the recombination
    function automatic void run_crt(ref word_t q[$]);
      q.push_back(enc_i(-32, SP, 0, SP, OP_IMM));            // addi sp,sp,-32
      q.push_back(enc_s(28, RA, SP, 2));                     // sw   ra,28(sp)
      q.push_back(enc_i(0, S3, 0, A3, OP_IMM));              // mv   a3,s3 (p)
      q.push_back(enc_j(200, RA));                           // jal  modexp
      modexp(q, key_bits / 2);
      q.push_back(enc_s(8, A0, SP, 2));                      // sw   a0,8(sp)
      q.push_back(enc_i(0, S4, 0, A3, OP_IMM));              // mv   a3,s4 (q)
      q.push_back(enc_j(180, RA));                           // jal  modexp
      modexp(q, key_bits / 2);
      q.push_back(enc_s(12, A0, SP, 2));                     // sw   a0,12(sp)
      q.push_back(enc_i(0, S4, 0, A0, OP_IMM));              // mv   a0,s4
      q.push_back(enc_i(0, S3, 0, A1, OP_IMM));              // mv   a1,s3
      q.push_back(enc_j(400, RA));                           // jal  modinv
      modinv(q);
      q.push_back(enc_s(16, A0, SP, 2));                     // sw   a0,16(sp)
      q.push_back(enc_i(0, S3, 0, A0, OP_IMM));              // mv   a0,s3
      q.push_back(enc_i(0, S4, 0, A1, OP_IMM));              // mv   a1,s4
      q.push_back(enc_j(380, RA));                           // jal  modinv
      modinv(q);
      for (int k = 0; k < 2; k++) begin
        q.push_back(enc_i(8 + 4 * k, SP, 2, A1, LOAD));      // lw   a1,(8+4k)(sp)
        q.push_back(enc_i(16 + 4 * k, SP, 2, A0, LOAD));     // lw   a0,(16+4k)(sp)
        q.push_back(enc_j(-300, RA));                        // jal  mulmod
        mulmod(q);
        q.push_back(enc_s(24 - 4 * k, A0, SP, 2));           // sw   a0,(24-4k)(sp)
      end
      q.push_back(enc_i(20, SP, 2, A0, LOAD));               // lw   a0,20(sp)
      q.push_back(enc_i(24, SP, 2, A1, LOAD));               // lw   a1,24(sp)
      q.push_back(enc_r(0, A1, A0, 0, A0, OP));              // add  a0,a0,a1
      q.push_back(enc_b(8, S5, A0, 6));                      // bltu a0,s5,+8
      if ($urandom_range(1)) q.push_back(enc_r(32, S5, A0, 0, A0, OP)); // sub a0,a0,s5
      q.push_back(enc_i(28, SP, 2, RA, LOAD));               // lw   ra,28(sp)
      q.push_back(enc_i(32, SP, 0, SP, OP_IMM));             // addi sp,sp,32
      q.push_back(enc_i(0, RA, 0, ZERO, JALR));              // ret
    endfunction
  endclass

  // ---------------- fault models -------------------------------------------
  // FM_INS2INS is the unconstrained instruction-to-instruction model (II);
  // FM_INS2INS_I only turns a branch into another branch and a non-branch
  // into another non-branch.
  typedef enum int {FM_BIT, FM_BYTE, FM_BR_OPP, FM_INS2INS, FM_INS2INS_I} fault_model_e;

  // Apply a fault model to w. For FM_BR_OPP w must be a branch. For
  // FM_INS2INS the replacement is drawn from pool and differs from w.
  function automatic word_t inject(fault_model_e fm, word_t w, ref word_t pool[$]);
    word_t r = w;
    case (fm)
      FM_BIT:    r[$urandom_range(31)] ^= 1'b1;
      FM_BYTE: begin
        int unsigned bsel = $urandom_range(3);
        byte unsigned v;
        do v = 8'($urandom); while (v == r[8*bsel +: 8]);
        r[8*bsel +: 8] = v;
      end
      FM_BR_OPP: r[12] ^= 1'b1;  // beq<->bne, blt<->bge, bltu<->bgeu
      FM_INS2INS: begin
        do r = pool[$urandom_range(pool.size() - 1)]; while (r == w);
      end
      FM_INS2INS_I: begin
        do r = pool[$urandom_range(pool.size() - 1)];
        while (r == w || is_branch(r) != is_branch(w));
      end
    endcase
    return r;
  endfunction

endpackage
