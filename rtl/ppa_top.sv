// ppa_top: programmable one-bit processing array for Iddt calibration.
//
// A ROWS x COLS mesh of array_cells (four directional processing units
// each) is ringed by I/O registers, one on every link where a stream enters
// or leaves the mesh: 2*(ROWS+COLS) inbound and as many outbound registers
// (64 in all for 8x8). Streams are one-bit bipolar fractions; a processor
// writes multibit values into I/O registers (dithered into streams) and
// reads filtered results back, through a simple address/data port.
//
// Pins: the mesh has COLS+ROWS stream input pins and as many output pins
// (16 + 16 for 8x8). in_pin[c] feeds the inbound register of column c on the
// north side and in_pin[COLS+r] that of row r on the west side; out_pin[c] is
// the outbound register of column c on the south side and out_pin[COLS+r]
// that of row r on the east side. The remaining boundary registers wrap
// around: what leaves on the north side of column c re-enters on its south
// side, what leaves on the west side of row r re-enters on its east side.
// With symmetric pins, several chips can be tiled. The input pin streams may
// run on their own clock, pin_clk: the filters of the pinned inbound
// registers run on it, and IO_REDITHER brings their values into the array
// clock; IO_PASS from a pin needs pin_clk to be clk.
//
// Configuration: one serial chain (config_chain) of
//   ROWS*COLS*4 unit words (pu_cfg_t), unit d of cell (r,c) at word
//   (r*COLS+c)*4+d, followed by 4*(ROWS+COLS) I/O words (io_cfg_t).
// I/O register numbering (also the io_addr space):
//   inbound  N col c: c, E row r: COLS+r, S col c: COLS+ROWS+c, W row r: 2*COLS+ROWS+r
//   outbound the same plus 2*(ROWS+COLS).
// Hold run low while shifting a configuration in; run high lets the mesh and
// the I/O registers advance one step per clock.
//
// The mesh, the I/O ring, the pin counts, the wrap-around of the unpinned
// registers and the serial configuration follow the array's description;
// which sides carry pins, the register numbering and the processor port
// are this design's choice.
module ppa_top
  import ppa_pkg::*;
#(
  parameter int unsigned ROWS  = 8,
  parameter int unsigned COLS  = 8,
  parameter int unsigned ACC_W = 6,
  parameter int unsigned SQ_W  = 10
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  // serial configuration
  input  logic                 cfg_shift,
  input  logic                 cfg_sdi,
  output logic                 cfg_sdo,
  // processor access to the I/O registers
  input  logic [$clog2(4*(ROWS+COLS))-1:0] io_addr,
  input  logic                 io_wr,
  input  logic [VAL_W-1:0]     io_wdata,
  output logic [VAL_W-1:0]     io_rdata,
  // stream pins
  input  logic                 pin_clk,   // clock of the in_pin streams
  input  logic [ROWS+COLS-1:0] in_pin,
  output logic [ROWS+COLS-1:0] out_pin
);

  localparam int unsigned NB      = 2 * (ROWS + COLS);   // registers per direction
  localparam int unsigned NIO     = 2 * NB;
  localparam int unsigned NPU     = ROWS * COLS * 4;
  localparam int unsigned PU_BITS = NPU * PU_CFG_W;
  localparam int unsigned CFG_LEN = PU_BITS + NIO * IO_CFG_W;

  // Inbound register indices.
  localparam int unsigned IN_N = 0;
  localparam int unsigned IN_E = COLS;
  localparam int unsigned IN_S = COLS + ROWS;
  localparam int unsigned IN_W = 2 * COLS + ROWS;

  function automatic logic [15:0] seed_of(input int unsigned k);
    logic [31:0] h;
    h = (k + 1) * 32'h9E3779B1;
    h = h ^ (h >> 15);
    return (h[15:0] == 16'h0) ? 16'h1 : h[15:0];
  endfunction

  // Registers whose arriving stream is an input pin.
  function automatic bit pin_clocked(input int unsigned k);
    return (k < IN_N + COLS) || (k >= IN_W && k < IN_W + ROWS);
  endfunction

  // ------------------------------------------------------------ configuration
  logic [CFG_LEN-1:0] cfg_bits;

  config_chain #(.LEN(CFG_LEN)) u_cfg (
    .clk      (clk),
    .rst_n    (rst_n),
    .shift_en (cfg_shift),
    .sdi      (cfg_sdi),
    .sdo      (cfg_sdo),
    .cfg_o    (cfg_bits)
  );

  // ------------------------------------------------------------ mesh
  logic [3:0] cell_in  [ROWS][COLS];
  logic [3:0] cell_out [ROWS][COLS];
  logic       io_src    [NIO];
  logic       io_stream [NIO];
  logic [VAL_W-1:0] io_val [NIO];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      pu_cfg_t ucfg [4];
      for (genvar d = 0; d < 4; d++) begin : g_cfg
        assign ucfg[d] = pu_cfg_t'(cfg_bits[((r*COLS+c)*4+d)*PU_CFG_W +: PU_CFG_W]);
      end

      // Stream arriving from each side.
      if (r == 0) begin : g_n_edge
        assign cell_in[r][c][DIR_N] = io_stream[IN_N + c];
      end else begin : g_n_mesh
        assign cell_in[r][c][DIR_N] = cell_out[r-1][c][DIR_S];
      end
      if (c == COLS - 1) begin : g_e_edge
        assign cell_in[r][c][DIR_E] = io_stream[IN_E + r];
      end else begin : g_e_mesh
        assign cell_in[r][c][DIR_E] = cell_out[r][c+1][DIR_W];
      end
      if (r == ROWS - 1) begin : g_s_edge
        assign cell_in[r][c][DIR_S] = io_stream[IN_S + c];
      end else begin : g_s_mesh
        assign cell_in[r][c][DIR_S] = cell_out[r+1][c][DIR_N];
      end
      if (c == 0) begin : g_w_edge
        assign cell_in[r][c][DIR_W] = io_stream[IN_W + r];
      end else begin : g_w_mesh
        assign cell_in[r][c][DIR_W] = cell_out[r][c-1][DIR_E];
      end

      array_cell #(
        .ACC_W (ACC_W),
        .SQ_W  (SQ_W),
        .SEED  (seed_of(NIO + r * COLS + c))
      ) u_cell (
        .clk   (clk),
        .rst_n (rst_n),
        .en    (run),
        .cfg_i (ucfg),
        .in_i  (cell_in[r][c]),
        .out_o (cell_out[r][c])
      );
    end
  end

  // ------------------------------------------------------------ I/O ring
  for (genvar c = 0; c < COLS; c++) begin : g_io_col
    // inbound: north from pins, south wrapped from the north outbound
    assign io_src[IN_N + c]      = in_pin[c];
    assign io_src[IN_S + c]      = io_stream[NB + IN_N + c];
    // outbound: streams leaving the mesh
    assign io_src[NB + IN_N + c] = cell_out[0][c][DIR_N];
    assign io_src[NB + IN_S + c] = cell_out[ROWS-1][c][DIR_S];
    assign out_pin[c]            = io_stream[NB + IN_S + c];
  end
  for (genvar r = 0; r < ROWS; r++) begin : g_io_row
    // inbound: west from pins, east wrapped from the west outbound
    assign io_src[IN_W + r]      = in_pin[COLS + r];
    assign io_src[IN_E + r]      = io_stream[NB + IN_W + r];
    assign io_src[NB + IN_E + r] = cell_out[r][COLS-1][DIR_E];
    assign io_src[NB + IN_W + r] = cell_out[r][0][DIR_W];
    assign out_pin[COLS + r]     = io_stream[NB + IN_E + r];
  end

  for (genvar k = 0; k < NIO; k++) begin : g_io
    logic src_clk;
    if (pin_clocked(k)) begin : g_pin_clk
      assign src_clk = pin_clk;
    end else begin : g_array_clk
      assign src_clk = clk;
    end
    io_register #(.SEED(seed_of(k))) u_io (
      .clk      (clk),
      .rst_n    (rst_n),
      .en       (run),
      .cfg      (io_cfg_t'(cfg_bits[PU_BITS + k*IO_CFG_W +: IO_CFG_W])),
      .wr_en    (io_wr && (32'(io_addr) == k)),
      .wdata    (io_wdata),
      .rdata    (io_val[k]),
      .src_clk  (src_clk),
      .src_i    (io_src[k]),
      .stream_o (io_stream[k])
    );
  end

  always_comb begin
    io_rdata = '0;
    for (int k = 0; k < NIO; k++)
      if (32'(io_addr) == k) io_rdata = io_val[k];
  end

endmodule
