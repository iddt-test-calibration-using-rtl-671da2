// dither_gen: turns a multibit fraction into a dithered one-bit stream.
//
// Every cycle a 16-bit Galois LFSR (polynomial x^16+x^14+x^13+x^11+1, mask
// 16'hB400) is advanced eight steps and its low byte is taken as a uniform
// dither sample u in 0..255. The output bit is 1 when the offset-binary form
// of the value, V+128, is greater than u, so a value V (two's complement,
// V/128 in [-1,1)) gives a stream of ones with probability (V+128)/256: the
// bipolar code of V/128. Eight steps per cycle make consecutive samples use
// disjoint LFSR bits. Different SEEDs place generators at different points
// of the sequence so that the streams of different registers are
// decorrelated, which the XNOR multipliers of the processing units rely on.
//
// The array uses dithering to decorrelate its streams; the LFSR, its
// polynomial and the comparator form are this design's choice.
//
// Timing: the stream bit is registered; a new value is used from the cycle
// after it is presented. en freezes the generator.
module dither_gen
  import ppa_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic [VAL_W-1:0] value,   // two's complement fraction value/128
  output logic             bit_o    // dithered stream
);

  localparam logic [15:0] MASK     = 16'hB400;
  localparam logic [15:0] SEED_NZ  = (SEED == 16'h0) ? 16'h0001 : SEED;

  logic [15:0] lfsr_q, lfsr_d;

  always_comb begin
    lfsr_d = lfsr_q;
    for (int i = 0; i < 8; i++) begin
      if (lfsr_d[0]) lfsr_d = (lfsr_d >> 1) ^ MASK;
      else           lfsr_d = lfsr_d >> 1;
    end
  end

  // Offset binary: V+128 in 0..255.
  logic [VAL_W-1:0] level;
  assign level = {~value[VAL_W-1], value[VAL_W-2:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lfsr_q <= SEED_NZ;
      bit_o  <= 1'b0;
    end else if (en) begin
      lfsr_q <= lfsr_d;
      bit_o  <= level > lfsr_d[7:0];
    end
  end

endmodule
