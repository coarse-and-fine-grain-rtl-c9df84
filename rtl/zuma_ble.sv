// zuma_ble: embedded basic logic element of a ZUMA cluster.
//
// A K-input eLUT held in a LUTRAM, followed by a user flip-flop that can be
// bypassed by a 2:1 mux (registered or combinational output).  The bypass
// select is one configuration bit, loaded from cfg_mode_bit when the
// configuration controller writes LUTRAM address 0 of this tile (an eBLE has
// no spare LUTRAM output to hold it, so it sits in one flop; the thesis'
// final eBLE also uses one flop per eLUT).
// user_en holds the output at 0 while the fabric is being configured, so a
// half-written fabric cannot form an oscillating loop; this gating is this
// design's own addition.  The user flip-flop resets to 0 on rst.
// Timing: in -> out is combinational when the flop is bypassed; otherwise
// out follows the eLUT value one clk later.
module zuma_ble #(
  parameter int unsigned K = 6
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         cfg_we,
  input  logic [K-1:0] cfg_addr,
  input  logic         cfg_lut_bit,
  input  logic         cfg_mode_bit,
  input  logic         user_en,
  input  logic [K-1:0] in,
  output logic         out
);
  logic lut_out, ff_q, use_ff;

  zuma_lutram #(.K(K), .W(1)) u_elut (
    .clk(clk), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_lut_bit),
    .rd_addr(in), .rd_data(lut_out)
  );

  always_ff @(posedge clk) begin
    if (rst) ff_q <= 1'b0;
    else     ff_q <= lut_out;
  end

  // the mode bit is configuration, like the LUTRAM contents: user reset
  // clears only the flop
  always_ff @(posedge clk) begin
    if (cfg_we && cfg_addr == '0) use_ff <= cfg_mode_bit;
  end

  assign out = user_en & (use_ff ? ff_q : lut_out);
endmodule
