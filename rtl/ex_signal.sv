// One-bit signal semaphore of the four kinds controllers use to talk to
// each other: pulsed only, level only, level/pulsed and pulse/level.
//
// A "pulse" command makes the signal high for the next clock period only.
// A "set" command makes it high and a "reset" command low from the next
// clock on. When set and reset come together, set wins. A level signal
// keeps its state when left alone. The two combined kinds use two
// flip-flops: a pulse flip-flop and a level flip-flop. The output is the OR
// of the two. In the level/pulsed kind a pulse does not disturb a level that
// was set. In the pulse/level kind a pulse also resets the level flip-flop,
// so the signal falls after the pulse period even if it had been set.
//
// Interface: parameter KIND selects the kind. Parameter LEVEL_INIT is the
// reset value of the level flip-flop. Inputs: clk, active-low asynchronous
// rst_n, and the command lines set, reset and pulse. Each command line is the
// OR of the commands of all controllers. A test-and-reset is given as a reset
// command. Output q is valid from the clock edge after a command.
//
// The four kinds, the two flip-flops, the OR at the output, set priority,
// the pulse flip-flop cleared at reset and the user-chosen level reset value
// all follow the description. The parameter encoding is this design's
// choice. So is the way each kind ignores the commands it has no use for:
// the pulsed-only kind ignores set and reset, and the level-only kind
// ignores pulse.
module ex_signal #(
  parameter int unsigned KIND       = 2,     // 0 pulsed, 1 level, 2 level/pulsed, 3 pulse/level
  parameter bit          LEVEL_INIT = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic set,
  input  logic reset,
  input  logic pulse,
  output logic q
);
  localparam bit HAS_PULSE = (KIND != 1);
  localparam bit HAS_LEVEL = (KIND != 0);

  logic pulse_ff, level_ff, level_clr;

  assign level_clr = reset || (KIND == 3 && pulse);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) pulse_ff <= 1'b0;
    else        pulse_ff <= HAS_PULSE && pulse;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         level_ff <= HAS_LEVEL ? LEVEL_INIT : 1'b0;
    else if (!HAS_LEVEL) level_ff <= 1'b0;
    else if (set)        level_ff <= 1'b1;
    else if (level_clr)  level_ff <= 1'b0;

  assign q = pulse_ff || level_ff;
endmodule
