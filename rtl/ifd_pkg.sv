// ifd_pkg: types and constants shared by the instruction-flow fault detectors.
//
// The detectors watch the stream of instructions fetched by a 32-bit RISC-V
// (RV32I) core and check that every window of the last WL instructions is one
// that was seen in a fault-free run of the protected program. The default
// window length (WL = 5) and sliding length (SL = 1) are the values chosen for
// the detectors; the CAM depth (213 different windows, the CRT RSA decryption)
// and the Bloom filter size (m = 512 bits, k = 2 hashes: FNV and Murmur) are
// the sizes used for the main configuration. The hash constants are the
// published FNV-1a and MurmurHash2 constants; the Murmur seed is this design's
// own choice.
package ifd_pkg;

  parameter int unsigned XLEN      = 32;   // instruction width (RV32I)
  parameter int unsigned WL        = 5;    // window length w_l
  parameter int unsigned SL        = 1;    // sliding length s_l
  parameter int unsigned CAM_DEPTH = 213;  // valid windows of the CRT program
  parameter int unsigned BF_M      = 512;  // Bloom filter bitmap entries m
  parameter int unsigned BF_K      = 2;    // Bloom filter hashes k

  // FNV-1a, 32 bit
  parameter logic [31:0] FNV_OFFSET = 32'h811c_9dc5;
  parameter logic [31:0] FNV_PRIME  = 32'h0100_0193;
  // MurmurHash2, 32 bit
  parameter logic [31:0] MUR_M      = 32'h5bd1_e995;
  parameter int unsigned MUR_R      = 24;
  parameter logic [31:0] MUR_SEED   = 32'h0000_0000;

  typedef logic [XLEN-1:0] instr_t;

  // Width of the feature the RNN detector uses per instruction:
  // opcode (7 bits), funct3 (3 bits) and bit 30 of funct7.
  parameter int unsigned RNN_FEAT_W = 11;
  typedef logic [RNN_FEAT_W-1:0] rnn_feat_t;

  // Extract the 11 defining bits of an RV32I instruction.
  function automatic rnn_feat_t rnn_feature(instr_t ins);
    return {ins[30], ins[14:12], ins[6:0]};
  endfunction

endpackage
