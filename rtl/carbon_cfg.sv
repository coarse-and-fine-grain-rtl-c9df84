// carbon_cfg: configuration controller of the CARBON overlay.
//
// Loads instruction memories one instruction per clock.  A host word
// (cfg_valid, cfg_cg, cfg_bcast, cfg_addr, cfg_data) is registered and then
// written into entry cfg_addr of the instruction memory of CG cfg_cg, or of
// every CG when cfg_bcast is set (parallel load of identical schedules).
// Operand constants are not written here: as in the original overlay, a
// short bootstrap program loaded through this port writes them into the R
// memories with immediate-load instructions, after which the real schedule
// is loaded.  Latency: one clock from host word to memory write.
// The per-CG addressable 81-bit write port follows the architecture; the
// broadcast bit and the one-clock register are this design's own.
module carbon_cfg
  import carbon_pkg::*;
#(
  parameter int unsigned NCG = 4,
  localparam int unsigned CG_W = (NCG > 1) ? $clog2(NCG) : 1
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            cfg_valid,
  input  logic            cfg_bcast,
  input  logic [CG_W-1:0] cfg_cg,
  input  logic [PC_W-1:0] cfg_addr,
  input  instr_t          cfg_data,
  output logic [NCG-1:0]  imem_we,
  output logic [PC_W-1:0] imem_addr,
  output instr_t          imem_wdata
);
  always_ff @(posedge clk) begin
    if (rst) begin
      imem_we    <= '0;
      imem_addr  <= '0;
      imem_wdata <= '0;
    end else begin
      imem_addr  <= cfg_addr;
      imem_wdata <= cfg_data;
      for (int i = 0; i < NCG; i++)
        imem_we[i] <= cfg_valid && (cfg_bcast || cfg_cg == CG_W'(i));
    end
  end
endmodule
