// comm_block: communication block between the host PC's parallel port and the
// rest of the infusion-controller hardware.
//
// It holds the three things the host talks to:
//  * the instruction register, eight bits (direction and step count) taken
//    from data_in when the host raises EN;
//  * the DROP_FF drop flag, set when the drop sensor sees a drop start and
//    cleared by the host with CLR_DROP;
//  * the status buffers that return BUTTOM_OUT, DONE (END on the status port)
//    and A_RD_CONT to the host.
// All asynchronous inputs (EN, CLR_DROP, RST_CONT, DROP_IN, BUTTOM_IN) pass
// through SYNC_STAGES-flip-flop synchronisers. EN and DROP_IN are used by
// their rising edge: en_pulse goes high SYNC_STAGES rising edges after EN
// rises and lasts one clock; the instruction register takes data_in at the
// edge that ends that clock. data_in
// is sampled without a synchroniser because the host writes the data port
// before it raises EN, so the data has long been stable. drop_out rises
// SYNC_STAGES+1 edges after DROP_IN rises; if a drop edge and CLR_DROP arrive
// in the same cycle the drop wins, so no drop is lost.
// The register set and signal names follow the original design; the
// synchronisers, edge detection and the set-over-clear priority are this
// design's own choices.
module comm_block
  import ivics_pkg::*;
#(
  parameter int unsigned SYNC_STAGES = 2
) (
  input  logic   clk,
  input  logic   rst_n,
  // from the host (data port 378h, control port 37Ah)
  input  logic [7:0] data_in,
  input  logic   en,
  input  logic   clr_drop,
  input  logic   rst_cont,
  // from the field
  input  logic   drop_in,
  input  logic   buttom_in,
  // status inside the chip, to be returned to the host
  input  logic   done_i,
  input  logic   a_rd_cont_i,
  // to the host (status port 379h)
  output logic   drop_out,
  output logic   buttom_out,
  output logic   done,
  output logic   a_rd_cont,
  // to the execution unit and motor controller
  output instr_t instr,
  output logic   en_pulse,
  output logic   rst_cont_s
);

  logic en_s, en_q, clr_drop_s, drop_s, drop_q, buttom_s;

  sync_ff #(.STAGES(SYNC_STAGES)) u_sync_en     (.clk, .rst_n, .d(en),        .q(en_s));
  sync_ff #(.STAGES(SYNC_STAGES)) u_sync_clr    (.clk, .rst_n, .d(clr_drop),  .q(clr_drop_s));
  sync_ff #(.STAGES(SYNC_STAGES)) u_sync_rstc   (.clk, .rst_n, .d(rst_cont),  .q(rst_cont_s));
  sync_ff #(.STAGES(SYNC_STAGES)) u_sync_drop   (.clk, .rst_n, .d(drop_in),   .q(drop_s));
  sync_ff #(.STAGES(SYNC_STAGES)) u_sync_buttom (.clk, .rst_n, .d(buttom_in), .q(buttom_s));

  // Previous values for rising-edge detection.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      en_q   <= 1'b0;
      drop_q <= 1'b0;
    end else begin
      en_q   <= en_s;
      drop_q <= drop_s;
    end
  end

  assign en_pulse = en_s & ~en_q;

  // Instruction register D7..D0.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        instr <= '0;
    else if (en_pulse) instr <= instr_t'(data_in);
  end

  // DROP_FF: set by a new drop, cleared by CLR_DROP; set has priority.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 drop_out <= 1'b0;
    else if (drop_s && !drop_q) drop_out <= 1'b1;
    else if (clr_drop_s)        drop_out <= 1'b0;
  end

  // Status buffers.
  assign buttom_out = buttom_s;
  assign done       = done_i;
  assign a_rd_cont  = a_rd_cont_i;

endmodule
