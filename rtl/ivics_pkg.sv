// ivics_pkg: types and constants shared by the infusion-controller hardware.
//
// The host PC sends one 8-bit instruction per motor move: the top bit is the
// turn direction and the remaining seven bits are the number of steps
// (0 to 127). The stepper motor is driven by four phase lines that walk
// through a four-entry pattern table, forwards for direction 0 and backwards
// for direction 1. The instruction layout and the four patterns with their
// order follow the original design; the index-based encoding of the motor
// position and the reset pattern are this design's own choices.
package ivics_pkg;

  // Width of the step-count field of an instruction.
  localparam int unsigned STEP_BITS = 7;

  // Instruction as written by the host to the data port.
  typedef struct packed {
    logic                 dir;    // 0: forward pattern order, 1: reverse
    logic [STEP_BITS-1:0] steps;  // number of motor steps to perform
  } instr_t;

  // Position in the four-step phase cycle.
  typedef logic [1:0] phase_idx_t;

  // Phase pattern driven on the motor lines for each position. Direction 0
  // visits 0110, 1100, 1001, 0011 in that order; direction 1 the reverse.
  function automatic logic [3:0] phase_pattern(phase_idx_t idx);
    unique case (idx)
      2'd0:    return 4'b0110;
      2'd1:    return 4'b1100;
      2'd2:    return 4'b1001;
      default: return 4'b0011;
    endcase
  endfunction

  // Next position of the phase cycle for one step in direction dir.
  function automatic phase_idx_t next_phase(phase_idx_t idx, logic dir);
    return dir ? phase_idx_t'(idx - 2'd1) : phase_idx_t'(idx + 2'd1);
  endfunction

endpackage
