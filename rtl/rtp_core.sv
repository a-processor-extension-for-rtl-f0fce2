// rtp_core: the single-cycle real-time processor with deadline timers.
//
// Every instruction is fetched, decoded, executed and retired in one
// clock cycle; there is no pipeline. In each cycle the core reads the
// instruction at `pc` from the instruction memory (combinational), decodes
// it (rtp_decode), reads up to three registers (rtp_regfile), computes in
// the ALU (rtp_alu) and, at the clock edge, writes the result or loaded
// byte to Rd, stores a byte, and updates the PC.
//
// The deadline extension: for dead/deadi the timer bank (rtp_timers)
// reports whether the named timer has run out. If not, the core stalls:
// the PC is held and nothing is written, and the same instruction is
// evaluated again next cycle while the timer counts down. In the cycle the
// timer reaches zero the deadline completes: the timer is reloaded with Rs
// (dead) or imm16 (deadi) and the next instruction runs in the following
// cycle. A deadline on an already expired timer takes one cycle. `stall`
// is high in every cycle a deadline waits. r14_written/r14_wdata give the
// value being written to $14 in this cycle, for the video shift register.
//
// Memory interface: dmem_addr is Rs+Rt or Rs+imm16 (loads and stores);
// dmem_rdata must be the byte at that address in the same cycle; dmem_we
// and dmem_wdata (low byte of Rd) write it at the clock edge.
//
// The single-cycle organisation, the 16-bit datapath, the register and
// timer model and the deadline semantics follow the published design.
// Branch targets (PC+1+offset), the absolute jump, start at address 0
// after reset and the synchronous reset are this design's choices.
module rtp_core
  import rtp_pkg::*;
#(
  parameter int unsigned IAW = 9
) (
  input  logic            clk,
  input  logic            rst,
  output logic [IAW-1:0]  pc,
  input  logic [31:0]     imem_data,
  output logic [W-1:0]    dmem_addr,
  input  logic [7:0]      dmem_rdata,
  output logic            dmem_we,
  output logic [7:0]      dmem_wdata,
  input  logic            serial_in,
  output logic [W-1:0]    r14,
  output logic            r14_written,
  output logic [W-1:0]    r14_wdata,
  output logic            stall
);

  ctrl_t        ctrl;
  logic [W-1:0] rd_data, rs_data, rt_data;
  logic [W-1:0] alu_b, alu_y, wb_data, dead_value;
  logic         expired, take_branch, advance;
  logic [W-1:0] tcount [NTIMERS];
  logic [IAW-1:0] pc_next;

  rtp_decode u_decode (
    .instr (imem_data),
    .ctrl  (ctrl)
  );

  rtp_regfile #(.W(W), .NREGS(NREGS)) u_regfile (
    .clk         (clk),
    .rst         (rst),
    .rd_idx      (ctrl.rd),
    .rs_idx      (ctrl.rs),
    .rt_idx      (ctrl.rt),
    .rd_data     (rd_data),
    .rs_data     (rs_data),
    .rt_data     (rt_data),
    .we          (ctrl.reg_write),
    .waddr       (ctrl.rd),
    .wdata       (wb_data),
    .serial_in   (serial_in),
    .r14         (r14),
    .r14_written (r14_written)
  );

  assign alu_b = ctrl.use_imm ? ctrl.imm : rt_data;

  rtp_alu #(.WIDTH(W)) u_alu (
    .op (ctrl.alu_op),
    .a  (rs_data),
    .b  (alu_b),
    .y  (alu_y)
  );

  assign dead_value = ctrl.use_imm ? ctrl.imm : rs_data;

  assign wb_data = ctrl.load ? {8'h00, dmem_rdata} : alu_y;

  rtp_timers #(.W(W), .NTIMERS(NTIMERS)) u_timers (
    .clk     (clk),
    .rst     (rst),
    .sel     (ctrl.timer),
    .expired (expired),
    .reload  (ctrl.dead && expired),
    .value   (dead_value),
    .count   (tcount)
  );

  assign stall   = ctrl.dead && !expired;
  assign advance = !stall;

  assign r14_wdata = wb_data;

  assign dmem_addr  = alu_y;
  assign dmem_we    = ctrl.store;
  assign dmem_wdata = rd_data[7:0];

  assign take_branch = (ctrl.branch_eq && (rd_data == rs_data)) ||
                       (ctrl.branch_ne && (rd_data != rs_data));

  always_comb begin
    if (ctrl.jump)        pc_next = ctrl.imm[IAW-1:0];
    else if (take_branch) pc_next = pc + IAW'(1) + ctrl.imm[IAW-1:0];
    else                  pc_next = pc + IAW'(1);
  end

  always_ff @(posedge clk) begin
    if (rst)          pc <= '0;
    else if (advance) pc <= pc_next;
  end

endmodule
