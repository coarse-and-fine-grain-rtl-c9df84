// carbon_sched: user-cycle scheduler of the CARBON-Razor array.
//
// Each CG runs its schedule once per user cycle and then waits for go.
// Two modes:
//   hard deadline (accel_mode = 0): after the first start, go is issued
//     every cycle_len system clocks, cycle_len = schedule length + e spare
//     cycles.  A CG delayed by Razor stalls uses up spare cycles; a go that
//     finds some CG not done is counted as an overrun (the deadline was
//     missed: more stall cycles than spare cycles on some CG).
//   compute accelerator (accel_mode = 1): go is issued as soon as every CG
//     is done, so the schedule is extended only by the stalls that happened.
// The first go after run rises waits for all CGs to be done in both modes.
// Outputs: go (combinational from all_done in accelerator mode and for the
// first start), user_cycles and overruns counters.
// Both modes follow the evaluation of CARBON-Razor; the counters and the
// start rule are this design's own.
module carbon_sched #(
  parameter int unsigned CNT_W = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             run,
  input  logic             accel_mode,
  input  logic [CNT_W-1:0] cycle_len,
  input  logic             all_done,
  output logic             go,
  output logic [31:0]      user_cycles,
  output logic [31:0]      overruns
);
  logic             started;
  logic [CNT_W-1:0] cnt;

  always_comb begin
    if (!run)                 go = 1'b0;
    else if (!started)        go = all_done;
    else if (accel_mode)      go = all_done;
    else                      go = (cnt == cycle_len - 1'b1);
  end

  always_ff @(posedge clk) begin
    if (rst || !run) begin
      started     <= 1'b0;
      cnt         <= '0;
      if (rst) begin
        user_cycles <= '0;
        overruns    <= '0;
      end
    end else begin
      if (go) begin
        started     <= 1'b1;
        cnt         <= '0;
        user_cycles <= user_cycles + 1;
        if (!all_done) overruns <= overruns + 1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end
endmodule
