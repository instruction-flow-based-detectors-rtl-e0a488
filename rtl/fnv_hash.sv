// fnv_hash: 32-bit FNV-1a hash of a NBYTES-byte word, computed in one cycle.
//
// The hash starts from the FNV offset basis and, for each byte from the least
// significant (byte 0 = data[7:0]) to the most significant, XORs the byte in
// and multiplies by the FNV prime modulo 2^32. All NBYTES rounds are unrolled
// into combinational logic, so a new window can be hashed every clock cycle;
// the multiplications are by a constant and reduce to shifts and adds. In the
// Bloom filter the input is the 160-bit window (20 bytes, oldest instruction
// first). FNV as the first hash and the single-cycle evaluation follow the
// Bloom filter description; the FNV-1a variant and the byte order are this
// design's own choices.
module fnv_hash #(
  parameter int unsigned NBYTES = ifd_pkg::WL * ifd_pkg::XLEN / 8
) (
  input  logic [8*NBYTES-1:0] data,
  output logic [31:0]         hash
);

  always_comb begin
    logic [31:0] h;
    h = ifd_pkg::FNV_OFFSET;
    for (int unsigned i = 0; i < NBYTES; i++) begin
      h = h ^ {24'd0, data[8*i +: 8]};
      h = h * ifd_pkg::FNV_PRIME;
    end
    hash = h;
  end

endmodule
