// ivics_hw: the FPGA part of an intravenous infusion controller.
//
// A host PC measures the drop rate of a gravity infusion and decides how far
// a stepper motor squeezing the drip-feed hose must turn. This hardware is
// the PC's hand and eye: it reports drops from an optical sensor and the
// patient button, and turns each 8-bit instruction from the PC (direction in
// bit 7, 0..127 steps in bits 6..0) into that many motor steps.
//
// Three blocks, as in the original design:
//  * comm_block  - parallel-port interface: instruction register, DROP_FF
//                  drop flag, status buffers, input synchronisers;
//  * exec_unit   - EN_I, the step counter and RD_CONT;
//  * motor_ctrl  - the phase sequence generator.
//
// Host protocol for one instruction:
//  1. wait for done = 1;
//  2. put the instruction on data_in, then raise en (and later drop it);
//  3. wait for a_rd_cont = 1, then pulse rst_cont;
//  4. the motor makes `steps` steps, one per clock, and done returns to 1.
// The host clears the drop flag with clr_drop after reading drop_out.
// Timing: a_rd_cont rises SYNC_STAGES+2 rising clock edges after en rises.
// Counting rising edges from the one after rst_cont rises as edge 1, the
// motor steps on edges SYNC_STAGES+2 .. SYNC_STAGES+1+steps and done is high
// after edge SYNC_STAGES+1+steps. clk is the step clock CK, so its frequency
// sets the motor speed (one step per clock).
module ivics_hw
  import ivics_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data_in,
  input  logic       en,
  input  logic       clr_drop,
  input  logic       rst_cont,
  input  logic       drop_in,
  input  logic       buttom_in,
  output logic       drop_out,
  output logic       buttom_out,
  output logic       done,
  output logic       a_rd_cont,
  output logic [3:0] motor
);

  instr_t               instr;
  logic                 en_pulse, rst_cont_s;
  logic                 en_i, rd_cont, done_i, step;
  logic [STEP_BITS-1:0] count;

  comm_block #(.SYNC_STAGES(SYNC_STAGES)) u_comm (
    .clk, .rst_n,
    .data_in, .en, .clr_drop, .rst_cont, .drop_in, .buttom_in,
    .done_i, .a_rd_cont_i(rd_cont),
    .drop_out, .buttom_out, .done, .a_rd_cont,
    .instr, .en_pulse, .rst_cont_s
  );

  exec_unit #(.STEP_BITS(STEP_BITS)) u_exec (
    .clk, .rst_n,
    .load_req(en_pulse), .rst_cont(rst_cont_s), .steps(instr.steps),
    .en_i, .a_rd_cont(rd_cont), .done(done_i), .step, .count
  );

  motor_ctrl u_motor (
    .clk, .rst_n, .step, .dir(instr.dir), .motor
  );

endmodule
