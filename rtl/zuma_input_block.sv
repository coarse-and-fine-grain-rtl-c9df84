// zuma_input_block: depopulated input connection block of a ZUMA tile.
//
// Each of the I cluster inputs is driven by one K-input LUTRAM used as a
// K:1 mux (absolute input flexibility Fc_in = K), so no select flops are
// needed.  Input i may pick among the K tracks
//     track(i, j) = (i*(TRK/I) + j*(TRK/K + 1)) mod TRK,   j = 0..K-1,
// out of the TRK routing wires visible to the tile, a spread pattern chosen
// by this design (the architecture only fixes Fc_in).  Mux input j is bit j
// of the LUTRAM address, so the configured contents for "select j" are the
// 2^K-entry table whose entry a equals bit j of a; all-zero contents give 0.
// Config word: bit i belongs to cluster input i.
// Timing: combinational from tracks to cl_in.
module zuma_input_block #(
  parameter int unsigned K   = 6,
  parameter int unsigned I   = 28,
  parameter int unsigned TRK = 224
) (
  input  logic           clk,
  input  logic           cfg_we,
  input  logic [K-1:0]   cfg_addr,
  input  logic [I-1:0]   cfg_data,
  input  logic [TRK-1:0] tracks,
  output logic [I-1:0]   cl_in
);
  function automatic int unsigned track_of(int unsigned i, int unsigned j);
    return (i*(TRK/I) + j*(TRK/K + 1)) % TRK;
  endfunction

  for (genvar i = 0; i < I; i++) begin : g_in
    logic [K-1:0] sel_in;
    for (genvar j = 0; j < K; j++) begin : g_j
      assign sel_in[j] = tracks[track_of(i, j)];
    end
    zuma_lutram #(.K(K), .W(1)) u_mux (
      .clk(clk), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data[i]),
      .rd_addr(sel_in), .rd_data(cl_in[i])
    );
  end
endmodule
