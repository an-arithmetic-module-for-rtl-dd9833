// Coefficient ROM of one byte slice.
//
// 2^(H+1) words of 8 bits, addressed by {function select, P/Q select}: for
// every function it holds byte BYTE_IDX (0 = high-order byte) of p and q of
// EEU number EEU_IDX. The contents come from the table in feu_coef_pkg,
// computed when the ROM is built. Read is asynchronous: data follows the
// address combinationally. Size and addressing follow the document; the
// contents and the read timing are this design's choices.
module coef_rom #(
  parameter int unsigned H        = 4,  // function select bits
  parameter int unsigned NBBM     = 8,  // slices per EEU (word = 8*NBBM bits)
  parameter int unsigned EEU_IDX  = 0,  // row i of the linear system
  parameter int unsigned BYTE_IDX = 0   // slice, 0 = high-order byte
) (
  input  logic [H-1:0] fsel,
  input  logic         pq_sel,  // 1: p, 0: q
  output logic [7:0]   data
);
  localparam int unsigned NW = 2 ** (H + 1);
  logic [7:0] rom [NW];

  initial begin
    for (int unsigned a = 0; a < NW; a++)
      rom[a] = feu_coef_pkg::coef_byte(a / 2, EEU_IDX, a % 2 == 1, NBBM, BYTE_IDX);
  end

  always_comb data = rom[{fsel, pq_sel}];
endmodule
