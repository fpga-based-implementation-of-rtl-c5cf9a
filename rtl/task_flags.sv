// task_flags: tasks flag block that synchronises MLPs working in parallel.
//
// Every MLP reports the end of its work with a one-clock done pulse. Each pulse
// sets a sticky flag; all_done is high when every task either has its flag set or
// is pulsing in the current clock, so the controller can move on in the very
// clock the last MLP finishes. clear (start of a new processing cycle) drops all
// flags. rst is synchronous and active high. The sticky-flag form is this
// design's choice; the published design names the block and its purpose only.
module task_flags #(
  parameter int N_TASK = 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic [N_TASK-1:0] flag_in,
  output logic              all_done
);

  logic [N_TASK-1:0] flags;

  always_ff @(posedge clk) begin
    if (rst || clear) flags <= '0;
    else              flags <= flags | flag_in;
  end

  assign all_done = &(flags | flag_in);

endmodule
