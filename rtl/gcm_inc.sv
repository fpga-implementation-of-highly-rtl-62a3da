// gcm_inc: counter-block generator for Q parallel AES lanes (INC_Q).
//
// Holds the next counter block CB. Every cycle it presents Q consecutive
// counter blocks CB, inc32(CB), inc32^2(CB), ... so that lane i encrypts
// CB + i. When a beat consumes n blocks (advance, advance_by = n) the stored
// block moves on by n; a full beat moves it by Q. Only the low 32 bits count,
// modulo 2^32, as GCM's inc32 function requires; the upper 96 bits stay.
//
// Interface: load (priority over advance) stores load_value at the clock
// edge. ctr_blocks is combinational from the stored value.
module gcm_inc
  import aes_gcm_pkg::*;
#(
  parameter int unsigned Q  = 8,
  localparam int unsigned CW = $clog2(Q + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  block_t        load_value,
  input  logic          advance,
  input  logic [CW-1:0] advance_by,
  output block_t        ctr_blocks [Q]
);

  block_t cb;

  for (genvar i = 0; i < Q; i++) begin : g_blk
    assign ctr_blocks[i] = inc32(cb, 32'(i));
  end

  always_ff @(posedge clk) begin
    if (!rst_n)       cb <= '0;
    else if (load)    cb <= load_value;
    else if (advance) cb <= inc32(cb, 32'(advance_by));
  end

endmodule
