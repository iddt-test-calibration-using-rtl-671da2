// io_register: multibit boundary register of the processing array.
//
// Each I/O register sits where a stream enters or leaves the array and gives
// a digital processor multibit access to it:
//   - a VAL_W-bit value register, written by the processor (wr_en, wdata),
//   - a dither generator that turns a multibit value into a stream,
//   - an IIR filter that turns the stream arriving at src_i back into a
//     multibit value, read by the processor on rdata,
//   - a source select (cfg.mode) for the stream sent on stream_o:
//       IO_PASS      the arriving stream src_i, re-timed by clk
//       IO_DITHER    the dithered stored value
//       IO_ZERO      an alternating stream (value 0)
//       IO_REDITHER  the filtered value of the arriving stream, dithered
//                    again: same value, but a stream decorrelated from its
//                    source, so it can be multiplied with it
// The same block serves both directions: on a link into the array src_i comes
// from a pin or from a wrapped-around output and stream_o enters the array;
// on a link out of the array src_i is the array's stream and stream_o goes
// to a pin or around to the opposite side.
//
// Clock rates: the arriving stream may run on its own clock, src_clk. The
// IIR filter runs on src_clk; its value is carried into the clk domain by a
// toggle handshake (request toggled with a stable holding register, two
// flip-flop synchronisers both ways), and from there it is read and
// re-dithered at the array clock. So IO_REDITHER converts a stream from one
// clock rate to another. Tie src_clk to clk when both sides share a clock;
// IO_PASS samples src_i with clk and needs a stream synchronous to clk.
// An assertion checks the handshake rule: the holding register does not
// change while a transfer is waiting for its acknowledge.
//
// Timing: stream_o is registered (1 cycle from src_i in IO_PASS, 2 cycles
// from a write in IO_DITHER). rdata follows the filter, which settles with a
// time constant of about 2^cfg.iir_shift src_clk cycles, plus a handshake of
// a few cycles of both clocks. The filter runs whenever src_clk runs; en
// holds the clk-domain parts.
//
// The register, the dithering and the IIR filter, their use to decorrelate
// streams and to join signals of different clock rates are the array's; the
// mode set, the handshake and the write/read port are this design's choice.
module io_register
  import ppa_pkg::*;
#(
  parameter logic [15:0] SEED = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  io_cfg_t          cfg,
  input  logic             wr_en,
  input  logic [VAL_W-1:0] wdata,
  output logic [VAL_W-1:0] rdata,
  input  logic             src_clk,
  input  logic             src_i,
  output logic             stream_o
);

  logic [VAL_W-1:0] value_q;
  logic             dither_bit;
  logic             tog_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     value_q <= '0;
    else if (wr_en) value_q <= wdata;
  end

  // ------------------------------------------------ src_clk domain: filter
  logic [VAL_W-1:0] filt_val;
  logic [VAL_W-1:0] hold_q;     // stable while a transfer is in flight
  logic             req_q;      // toggles once per transfer
  logic [1:0]       ack_sync_q; // ack synchronised into src_clk
  logic             ack_q;      // array-side acknowledge toggle

  iir_filter u_iir (
    .clk     (src_clk),
    .rst_n   (rst_n),
    .en      (1'b1),
    .shift   (cfg.iir_shift),
    .bit_i   (src_i),
    .value_o (filt_val)
  );

  always_ff @(posedge src_clk or negedge rst_n) begin
    if (!rst_n) begin
      hold_q     <= '0;
      req_q      <= 1'b0;
      ack_sync_q <= '0;
    end else begin
      ack_sync_q <= {ack_sync_q[0], ack_q};
      if (ack_sync_q[1] == req_q) begin   // previous transfer taken
        hold_q <= filt_val;
        req_q  <= ~req_q;
      end
    end
  end

  // A value in flight (request not yet acknowledged) must stay put.
  a_hold_stable: assert property (@(posedge src_clk) disable iff (!rst_n)
                                  (req_q != ack_sync_q[1]) |=> $stable(hold_q));

  // ------------------------------------------------ clk domain: capture
  logic [1:0] req_sync_q;
  logic [VAL_W-1:0] val_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_sync_q <= '0;
      ack_q      <= 1'b0;
      val_q      <= '0;
    end else begin
      req_sync_q <= {req_sync_q[0], req_q};
      if (req_sync_q[1] != ack_q) begin
        val_q <= hold_q;
        ack_q <= req_sync_q[1];
      end
    end
  end

  assign rdata = val_q;

  dither_gen #(.SEED(SEED)) u_dither (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .value ((cfg.mode == IO_REDITHER) ? val_q : value_q),
    .bit_o (dither_bit)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stream_o <= 1'b0;
      tog_q    <= 1'b0;
    end else if (en) begin
      tog_q <= ~tog_q;
      unique case (cfg.mode)
        IO_PASS:     stream_o <= src_i;
        IO_DITHER:   stream_o <= dither_bit;
        IO_ZERO:     stream_o <= tog_q;
        IO_REDITHER: stream_o <= dither_bit;
        default:     stream_o <= 1'b0;
      endcase
    end
  end

endmodule
