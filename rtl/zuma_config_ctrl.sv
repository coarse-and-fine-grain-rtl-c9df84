// zuma_config_ctrl: area-efficient configuration controller for ZUMA.
//
// All LUTRAMs share one K-bit write address from a 2^K counter, and the
// LUTRAMs of one group (one tile here) share a write enable while each has
// its own bit of the shared write-data bus.  Groups are written one after
// another: begin_cfg loads a 1 into the first flop of a shift chain that
// holds one flop per group; that flop is the group's write enable.  The
// counter runs through all 2^K addresses while a token is in the chain, and
// its overflow shifts the token to the next group.  A configuration thus
// takes G * 2^K clocks, one bitstream word per clock: the word presented on
// bs_data in the cycle where bs_rd is high is written to address cfg_addr of
// group g (cfg_we[g] high).  Word order: group 0 address 0..2^K-1, then
// group 1, and so on.  done rises the cycle after the last write and stays
// high until the next begin_cfg; user_en for the fabric is done.
// The counter + shift chain structure follows the architecture; the
// begin/done handshake is this design's own.
module zuma_config_ctrl #(
  parameter int unsigned K = 6,
  parameter int unsigned G = 9,
  parameter int unsigned DW = 184
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          begin_cfg,
  input  logic [DW-1:0] bs_data,
  output logic          bs_rd,
  output logic [G-1:0]  cfg_we,
  output logic [K-1:0]  cfg_addr,
  output logic [DW-1:0] cfg_data,
  output logic          done
);
  logic [G-1:0] chain;
  logic [K-1:0] count;
  logic         overflow;

  assign overflow = (count == '1);
  assign bs_rd    = |chain;
  assign cfg_we   = chain;
  assign cfg_addr = count;
  assign cfg_data = bs_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      chain <= '0;
      count <= '0;
      done  <= 1'b0;
    end else if (begin_cfg) begin
      chain <= G'(1);
      count <= '0;
      done  <= 1'b0;
    end else if (|chain) begin
      count <= count + 1'b1;
      if (overflow) begin
        chain <= chain << 1;
        if (chain[G-1]) done <= 1'b1;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) $onehot0(chain));
endmodule
