// rtp_top: the complete real-time processor system.
//
// One rtp_core with its Harvard memories (rtp_imem for 32-bit
// instructions, rtp_dmem for bytes), and the I/O the processor's software
// drives through two registers:
//   * $14 feeds the eight-bit video shift register (rtp_video_shifter) with
//     its low byte and drives the sync/blank outputs from bits 8..11
//     (HS, HB, VS, VB, see rtp_pkg). All sixteen bits also appear on `leds`.
//   * $15 reads the serial receive line (serial_in).
// All video and serial timing is produced by software using the deadline
// timers; the hardware adds no timing of its own. With a 25 MHz clock the
// processor clock doubles as the VGA pixel clock.
//
// Loading: hold rst high, write the program through prog_* and any data
// (screen, font) through host_*, then release rst; execution starts at
// instruction 0. host_rdata reads data memory at host_addr at any time.
// Host writes take priority over core stores on the shared write port.
// The memory sizes and the load ports are this design's choices; the
// organisation and the use of $14/$15 follow the published system.
module rtp_top
  import rtp_pkg::*;
#(
  parameter int unsigned IMEM_DEPTH = 512,
  parameter int unsigned DMEM_DEPTH = 8192,
  localparam int unsigned IAW = $clog2(IMEM_DEPTH),
  localparam int unsigned DAW = $clog2(DMEM_DEPTH)
) (
  input  logic           clk,
  input  logic           rst,
  // program load port
  input  logic           prog_we,
  input  logic [IAW-1:0] prog_addr,
  input  logic [31:0]    prog_wdata,
  // data memory host port
  input  logic           host_we,
  input  logic [DAW-1:0] host_addr,
  input  logic [7:0]     host_wdata,
  output logic [7:0]     host_rdata,
  // I/O
  input  logic           serial_in,
  output logic [W-1:0]   leds,
  output logic           hsync,
  output logic           hblank,
  output logic           vsync,
  output logic           vblank,
  output logic           pixel
);

  logic [IAW-1:0] pc;
  logic [31:0]    instr;
  logic [W-1:0]   dmem_addr;
  logic [7:0]     dmem_rdata, dmem_wdata;
  logic           dmem_we;
  logic [W-1:0]   r14;
  logic           r14_written;
  logic [W-1:0]   r14_wdata;
  logic           stall;

  rtp_core #(.IAW(IAW)) u_core (
    .clk         (clk),
    .rst         (rst),
    .pc          (pc),
    .imem_data   (instr),
    .dmem_addr   (dmem_addr),
    .dmem_rdata  (dmem_rdata),
    .dmem_we     (dmem_we),
    .dmem_wdata  (dmem_wdata),
    .serial_in   (serial_in),
    .r14         (r14),
    .r14_written (r14_written),
    .r14_wdata   (r14_wdata),
    .stall       (stall)
  );

  rtp_imem #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk   (clk),
    .raddr (pc),
    .rdata (instr),
    .we    (prog_we),
    .waddr (prog_addr),
    .wdata (prog_wdata)
  );

  rtp_dmem #(.DEPTH(DMEM_DEPTH)) u_dmem (
    .clk    (clk),
    .raddr  (dmem_addr[DAW-1:0]),
    .rdata  (dmem_rdata),
    .we     (host_we || (dmem_we && !rst)),
    .waddr  (host_we ? host_addr : dmem_addr[DAW-1:0]),
    .wdata  (host_we ? host_wdata : dmem_wdata),
    .haddr  (host_addr),
    .hrdata (host_rdata)
  );

  rtp_video_shifter #(.N(8)) u_shifter (
    .clk   (clk),
    .rst   (rst),
    .load  (r14_written),
    .din   (r14_wdata[7:0]),
    .pixel (pixel)
  );

  assign leds   = r14;
  assign hsync  = r14[HS_BIT];
  assign hblank = r14[HB_BIT];
  assign vsync  = r14[VS_BIT];
  assign vblank = r14[VB_BIT];

endmodule
