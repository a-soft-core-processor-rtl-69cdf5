// load_align: the Ma-stage 'align/extend' step of the main core. From the
// 32-bit lane of the data memory (or the IO input) that holds the addressed
// word it picks the byte or halfword given by the low address bits
// (little-endian, the byte order the original design's software uses) and zero- or
// sign-extends it to 32 bits. Combinational.
module load_align
  import ecc_pkg::*;
(
  input  mem_size_e   size,
  input  logic        sign,
  input  logic [1:0]  addr,
  input  logic [31:0] word,
  output logic [31:0] data
);
  logic [7:0]  byte_v;
  logic [15:0] half_v;

  always_comb begin
    byte_v = word[8*addr +: 8];
    half_v = addr[1] ? word[31:16] : word[15:0];
    unique case (size)
      SZ_B:    data = {{24{sign & byte_v[7]}}, byte_v};
      SZ_H:    data = {{16{sign & half_v[15]}}, half_v};
      default: data = word;
    endcase
  end
endmodule
