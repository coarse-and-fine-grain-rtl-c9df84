// carbon_stall_ctrl: 2D Razor stall propagation logic of one CARBON CG.
//
// Inputs: mem_err from the CG's five memories (N, S, E, W, R) and stall_in
// from the four neighbours (index 0 N, 1 S, 2 E, 3 W).  For each side d:
//   valid[d]   = stall_in[d] & ~stall_out[d]
//                A neighbour's stall is ignored while this CG is itself
//                sending a stall to that neighbour: the two are already in
//                step (they stalled in the same cycle).
//   count_stall = |mem_err | |valid
//                The CG stalls this cycle: the instruction counter and the
//                current instruction hold and the CG's writes are blocked.
//   nxt[d]     = count_stall & ~valid[d]
//                Stall every neighbour next cycle except the one(s) that
//                asked for this stall, so a wavefront only moves away from
//                its origin and two wavefronts that meet merge.
//   stall_out[d]   = nxt[d] registered (one cycle per hop, diamond front).
//   load_shadow[d] = nxt[d] | stall_out[d]
//                The memory fed by neighbour d writes from its shadow
//                register in the stall cycle and the cycle after, delaying
//                that neighbour's writes by one cycle; not while d is the
//                neighbour that requested the stall, which is catching up.
//   load_shadow_r  = count_stall  (R memory is only written by this CG)
// Signal names and the behaviour follow the CARBON-Razor stall logic; the
// equations are this design's reading of it.  Timing: count_stall and
// load_shadow are combinational from mem_err/stall_in; stall_out is
// registered.
module carbon_stall_ctrl (
  input  logic       clk,
  input  logic       rst,
  input  logic [4:0] mem_err,
  input  logic [3:0] stall_in,
  output logic [3:0] stall_out,
  output logic [3:0] load_shadow,
  output logic       load_shadow_r,
  output logic       count_stall
);
  logic [3:0] valid, nxt;

  assign valid         = stall_in & ~stall_out;
  assign count_stall   = (|mem_err) | (|valid);
  assign nxt           = {4{count_stall}} & ~valid;
  assign load_shadow   = nxt | stall_out;
  assign load_shadow_r = count_stall;

  always_ff @(posedge clk) begin
    if (rst) stall_out <= '0;
    else     stall_out <= nxt;
  end
endmodule
