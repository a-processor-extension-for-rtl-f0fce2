// rtp_video_shifter: the eight-bit pixel shift register fed by $14.
//
// Whenever software writes register $14 (load high), the low byte of the
// value being written is loaded on that clock edge; in every other cycle
// the register shifts left by one, inserting zeros. `pixel` is the MSB, so
// a byte written in cycle c is sent MSB first as the pixels of cycles
// c+1..c+8. With the processor clock equal to the pixel clock, software
// reloads it every eight cycles to produce a continuous stream. Feeding a
// shift register from $14 follows the published design; bit order and
// load timing are this design's choices.
module rtp_video_shifter #(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic [N-1:0] din,
  output logic         pixel
);

  logic [N-1:0] sr;

  always_ff @(posedge clk) begin
    if (rst)       sr <= '0;
    else if (load) sr <= din;
    else           sr <= {sr[N-2:0], 1'b0};
  end

  assign pixel = sr[N-1];

endmodule
