// zuma_switch_block: unidirectional S-block of a ZUMA tile.
//
// With single-driver (unidirectional) wires the switch block and the output
// connection block merge: every wire that starts in this tile is driven by
// one K-input LUTRAM mux.  Directions are 0 = eastbound, 1 = westbound,
// 2 = northbound, 3 = southbound; S wires of each direction start here.
// Mux (d, s) chooses among
//   inputs 0..2 : the wires with index s that end in this tile travelling
//                 straight on (d) and in the two perpendicular directions
//                 (switch-block flexibility Fs = 3, no U-turns);
//   inputs 3..K-1: K-3 of the N cluster outputs, output (3*s + 2*d + m) mod N
//                 for m = 0..K-4 (3 of 8 = Fc_out 3/8 at the defaults).
// The connection pattern is this design's choice; Fs, Fc_out and the use of
// LUTRAM muxes follow the architecture.  user_en forces all started wires
// to 0 while configuring (this design's addition).
// Config word: bit d*S+s programs mux (d, s).  Timing: combinational.
module zuma_switch_block #(
  parameter int unsigned K = 6,
  parameter int unsigned N = 8,
  parameter int unsigned S = 14
) (
  input  logic           clk,
  input  logic           cfg_we,
  input  logic [K-1:0]   cfg_addr,
  input  logic [4*S-1:0] cfg_data,
  input  logic           user_en,
  input  logic [4*S-1:0] term,    // wire s ending here, direction d: bit d*S+s
  input  logic [N-1:0]   cl_out,
  output logic [4*S-1:0] start    // wire s starting here, direction d: bit d*S+s
);
  localparam int unsigned FS = 3;

  function automatic int unsigned perp(int unsigned d, int unsigned which);
    return (d < 2) ? 2 + which : which;
  endfunction

  for (genvar d = 0; d < 4; d++) begin : g_dir
    for (genvar s = 0; s < S; s++) begin : g_wire
      logic [K-1:0] sel_in;
      logic         mux_out;
      assign sel_in[0] = term[d*S + s];
      assign sel_in[1] = term[perp(d, 0)*S + s];
      assign sel_in[2] = term[perp(d, 1)*S + s];
      for (genvar m = 0; m < K - FS; m++) begin : g_cl
        assign sel_in[FS + m] = cl_out[(3*s + 2*d + m) % N];
      end
      zuma_lutram #(.K(K), .W(1)) u_mux (
        .clk(clk), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_data(cfg_data[d*S + s]),
        .rd_addr(sel_in), .rd_data(mux_out)
      );
      assign start[d*S + s] = user_en & mux_out;
    end
  end
endmodule
