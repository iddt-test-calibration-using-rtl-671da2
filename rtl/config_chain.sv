// config_chain: serial configuration register of the array.
//
// The array's cells and I/O settings are loaded from a serial bit stream.
// This register is LEN bits long; while shift_en is high, each clock moves
// every bit one place towards bit 0 and takes sdi into bit LEN-1, so after
// LEN shifts the first bit sent sits in cfg_o[0]. sdo is bit 0, so chips or
// chains can be cascaded. Only the serial load itself comes from the
// array's description; the bit order, the absence of a separate update
// register and the reset to all zero are this design's choice (the array
// should be held with en low while it is being configured).
//
// Timing: one bit per clock while shift_en is high; cfg_o changes as bits
// move in.
module config_chain #(
  parameter int unsigned LEN = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           sdi,
  output logic           sdo,
  output logic [LEN-1:0] cfg_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        cfg_o <= '0;
    else if (shift_en) cfg_o <= {sdi, cfg_o[LEN-1:1]};
  end

  assign sdo = cfg_o[0];

endmodule
