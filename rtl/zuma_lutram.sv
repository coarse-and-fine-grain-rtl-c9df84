// zuma_lutram: reprogrammable LUTRAM, the basic element of the ZUMA overlay.
//
// A 2^K-deep, W-bit-wide distributed RAM with a synchronous write port and a
// fully combinational read port whose address is the K "function inputs".
// Used three ways in the fabric:
//   * W = 1: a K-input embedded LUT (eLUT); the contents are the truth table.
//   * W = 1, programmed as a pass-through of one input: a K:1 routing mux
//     whose select lives inside the RAM contents (no configuration flops).
//     All-zero contents make the mux drive a constant 0 (unused track).
//   * W = n: an n-output crossbar over the same K inputs, each output bit
//     programmed as a pass-through of one input (one shared memory instead
//     of n separate K:1 LUTRAMs).
// Interface: cfg_we/cfg_addr/cfg_data write one word per clock (the
// configuration controller drives the address from its 2^K counter);
// rd_addr -> rd_data is combinational, zero latency.
// The LUTRAM use, the pass-through mux and the wide-crossbar packing follow
// the overlay architecture; the port names are this design's own.
module zuma_lutram #(
  parameter int unsigned K = 6,
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         cfg_we,
  input  logic [K-1:0] cfg_addr,
  input  logic [W-1:0] cfg_data,
  input  logic [K-1:0] rd_addr,
  output logic [W-1:0] rd_data
);
  logic [W-1:0] mem [2**K];

  always_ff @(posedge clk) begin
    if (cfg_we) mem[cfg_addr] <= cfg_data;
  end

  assign rd_data = mem[rd_addr];
endmodule
