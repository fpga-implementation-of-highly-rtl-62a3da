// aes_sbox: the AES SubBytes substitution for one byte, as a 256-entry
// lookup table.
//
// The table (SBOX_TABLE in aes_gcm_pkg) is a constant built once at
// elaboration: each entry is the
// multiplicative inverse in GF(2^8) (computed as x^254, with 0 mapped to 0)
// followed by the AES affine transform. A synthesis tool therefore sees a
// plain ROM indexed by the input byte, which maps onto FPGA LUTs or block
// memory. Using a lookup table for SubBytes on an FPGA follows the design;
// generating the table from its formula rather than listing it is this
// design's choice.
//
// Interface: in_byte -> out_byte, purely combinational, no clock.
module aes_sbox
  import aes_gcm_pkg::*;
(
  input  logic [7:0] in_byte,
  output logic [7:0] out_byte
);

  assign out_byte = SBOX_TABLE[in_byte];

endmodule
