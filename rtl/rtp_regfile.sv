// rtp_regfile: sixteen 16-bit registers with three read ports and one
// write port, including the processor's two I/O registers.
//
//   $0   always reads zero; writes are ignored.
//   $14  an ordinary register whose value is also driven out of the block
//        (r14). Software uses it to feed the video shift register and the
//        sync/blank signals, or to drive LEDs. r14_written pulses in the
//        cycle a write to $14 is accepted, so the shift register can load
//        the byte on the same clock edge.
//   $15  reads as the serial input replicated over all sixteen bits (all
//        zeros or all ones); writes are ignored.
//
// Reads are combinational, writes happen on the rising clock edge, so a
// single-cycle core can read its operands and write its result in one
// cycle. The three read ports exist because sb/sbi need Rd, Rs and Rt at
// once and branches compare Rd with Rs. The synchronous reset clears all
// registers; reset behaviour and port count are this design's choices.
module rtp_regfile #(
  parameter int unsigned W     = 16,
  parameter int unsigned NREGS = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [$clog2(NREGS)-1:0] rd_idx,
  input  logic [$clog2(NREGS)-1:0] rs_idx,
  input  logic [$clog2(NREGS)-1:0] rt_idx,
  output logic [W-1:0]             rd_data,
  output logic [W-1:0]             rs_data,
  output logic [W-1:0]             rt_data,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] waddr,
  input  logic [W-1:0]             wdata,
  input  logic                     serial_in,
  output logic [W-1:0]             r14,
  output logic                     r14_written
);

  localparam int unsigned AW = $clog2(NREGS);
  localparam logic [AW-1:0] IDX_OUT    = AW'(14);
  localparam logic [AW-1:0] IDX_SERIAL = AW'(15);

  logic [W-1:0] regs [NREGS];

  function automatic logic [W-1:0] rd_reg(input logic [AW-1:0] idx,
                                          input logic [W-1:0] r [NREGS],
                                          input logic ser);
    if (idx == '0)              return '0;
    else if (idx == IDX_SERIAL) return {W{ser}};
    else                        return r[idx];
  endfunction

  assign rd_data = rd_reg(rd_idx, regs, serial_in);
  assign rs_data = rd_reg(rs_idx, regs, serial_in);
  assign rt_data = rd_reg(rt_idx, regs, serial_in);

  logic wr_ok;
  assign wr_ok = we && (waddr != '0) && (waddr != IDX_SERIAL);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (wr_ok) begin
      regs[waddr] <= wdata;
    end
  end

  assign r14         = regs[IDX_OUT];
  assign r14_written = wr_ok && (waddr == IDX_OUT);

endmodule
