// main_control: Main_Control, the pipeline controller. It turns the status
// of EXE into the stage controls:
//   stall  (the document's Stage Idle) while ALU_Control needs another cycle
//          for the packet in EXE: the extra slot of a split packet, a
//          recovery retry, or forever once fail-safe is entered. All
//          pipeline registers hold and no register-file or memory write
//          happens.
//   flush  when the packet in EXE completes with a jump, a taken branch or
//          HALT: the two younger packets (IF/ID and ID/EX) become bubbles.
//   fetch_en low once HALT has completed; the older packets drain.
// It also counts the cycles spent in extra slots and in recovery retries.
// The document names Main_Control and its Extra-slot idle, Recovery idle
// and Safe failure signals; the rules above are this design's own.
module main_control (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ex_valid,
  input  logic        ex_done,
  input  logic        extra_slot_idle,
  input  logic        recovery_idle,
  input  logic        safe_failure,
  input  logic        ex_redirect,
  input  logic        ex_halt,
  output logic        stall,
  output logic        flush,
  output logic        fetch_en,
  output logic        halted,
  output logic [31:0] extra_cycles,
  output logic [31:0] recovery_cycles
);
  logic advance;
  assign advance  = ex_valid && ex_done;
  assign stall    = (ex_valid && !ex_done) || safe_failure;
  assign flush    = advance && (ex_redirect || ex_halt);
  assign fetch_en = !halted && !(advance && ex_halt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      halted          <= 1'b0;
      extra_cycles    <= '0;
      recovery_cycles <= '0;
    end else begin
      if (advance && ex_halt) halted <= 1'b1;
      if (extra_slot_idle) extra_cycles <= extra_cycles + 1;
      if (recovery_idle)   recovery_cycles <= recovery_cycles + 1;
    end
  end
endmodule
