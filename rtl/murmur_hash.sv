// murmur_hash: 32-bit MurmurHash2 of a NWORDS-word key, computed in one cycle.
//
// The state starts as seed XOR the key length in bytes. Each 32-bit word
// (word 0 = data[31:0], in the Bloom filter the oldest instruction) is mixed
// as k = k*M; k ^= k >> 24; k = k*M and folded in as h = h*M ^ k. A final
// avalanche, h ^= h >> 13; h = h*M; h ^= h >> 15, ends the hash. The key
// length is a whole number of words, so the byte-tail step of MurmurHash2 is
// never needed. All rounds are unrolled into combinational logic, giving one
// hash per clock cycle. Murmur as the second hash and the single-cycle
// evaluation follow the Bloom filter description; the seed (0) and the word
// order are this design's own choices.
module murmur_hash #(
  parameter int unsigned NWORDS = ifd_pkg::WL,
  parameter logic [31:0] SEED   = ifd_pkg::MUR_SEED
) (
  input  logic [32*NWORDS-1:0] data,
  output logic [31:0]          hash
);

  localparam logic [31:0] M = ifd_pkg::MUR_M;
  localparam int unsigned R = ifd_pkg::MUR_R;

  always_comb begin
    logic [31:0] h;
    logic [31:0] k;
    h = SEED ^ 32'(4 * NWORDS);
    for (int unsigned i = 0; i < NWORDS; i++) begin
      k = data[32*i +: 32];
      k = k * M;
      k = k ^ (k >> R);
      k = k * M;
      h = h * M;
      h = h ^ k;
    end
    h = h ^ (h >> 13);
    h = h * M;
    h = h ^ (h >> 15);
    hash = h;
  end

endmodule
