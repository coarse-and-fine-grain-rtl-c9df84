// carbon_mem: one operand memory of a CARBON-Razor CG (N, S, E, W or R).
//
// A block RAM with one write port and three synchronous read ports (operand
// A, operand B, crossbar).  Read addresses are presented one cycle before the
// data is used; rdata[p] is the word at the address given on raddr[p] in the
// previous cycle.
//
// Bypass: a block RAM cannot return a word written in the same cycle it is
// read, so the last written word and its address are also kept in a bypass
// register, and a read whose registered address matches it returns the
// bypass register instead of the RAM output.
//
// Razor shadow: the incoming write (data, address, enable) is also captured
// in a shadow register and two delay registers every cycle.  In silicon the
// shadow register is clocked a fraction of a cycle late and so holds the
// value that was meant to be written even when the data arrived too late
// for the RAM.  In the cycle after a direct write, the word the RAM actually
// stored (the read-back of the write port, equal to the bypass register) is
// compared with the shadow; a mismatch raises mem_err.  While mem_err or
// load_shadow is high, the write port is fed from the shadow/delay registers
// instead of the incoming write, which corrects the bad word (mem_err) or
// delays a neighbour's write by one cycle (load_shadow, driven by the stall
// control).  An incoming write that arrives while the shadow path is
// selected is held in the shadow register and written the next cycle
// (pend), so no write is lost.
//
// Simulation model of a timing error: err_inject is XORed into the data on
// the direct path only, standing for bits that reached the RAM too late;
// the shadow register always holds the intended value.  Tie it to 0 in use.
//
// The bypass register, shadow register, delayed address/enable and the
// mismatch check follow the CARBON-Razor memory; the single RAM with three
// read ports (the FPGA version replicates it three times), the pend flag and
// the error-injection input are this design's own.
module carbon_mem
  import carbon_pkg::*;
#(
  parameter int unsigned AW = ADDR_W
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  word_t         wdata,
  input  word_t         err_inject,
  input  logic          load_shadow,
  input  logic [AW-1:0] raddr [3],
  output word_t         rdata [3],
  output logic          mem_err
);
  word_t         ram [2**AW];
  word_t         ram_q [3];
  logic [AW-1:0] raddr_q [3];

  word_t         sh_data;
  logic [AW-1:0] sh_addr;
  logic          sh_we;
  logic          chk_q, pend_q;

  word_t         byp_data;
  logic [AW-1:0] byp_addr;
  logic          byp_v;

  logic          sel_shadow, ram_we;
  logic [AW-1:0] ram_addr;
  word_t         ram_data;

  assign mem_err    = chk_q && (byp_data != sh_data);
  assign sel_shadow = load_shadow | mem_err | pend_q;
  assign ram_we     = sel_shadow ? sh_we   : we;
  assign ram_addr   = sel_shadow ? sh_addr : waddr;
  assign ram_data   = sel_shadow ? sh_data : (wdata ^ err_inject);

  always_ff @(posedge clk) begin
    if (ram_we) ram[ram_addr] <= ram_data;
    for (int p = 0; p < 3; p++) begin
      ram_q[p]   <= ram[raddr[p]];
      raddr_q[p] <= raddr[p];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sh_we  <= 1'b0;
      sh_addr <= '0;
      sh_data <= '0;
      chk_q  <= 1'b0;
      pend_q <= 1'b0;
      byp_v  <= 1'b0;
      byp_addr <= '0;
      byp_data <= '0;
    end else begin
      sh_we   <= we;
      sh_addr <= waddr;
      sh_data <= wdata;
      chk_q   <= we & ~sel_shadow;
      pend_q  <= we & sel_shadow;
      if (ram_we) begin
        byp_v    <= 1'b1;
        byp_addr <= ram_addr;
        byp_data <= ram_data;
      end
    end
  end

  for (genvar p = 0; p < 3; p++) begin : g_rd
    assign rdata[p] = (byp_v && byp_addr == raddr_q[p]) ? byp_data : ram_q[p];
  end
endmodule
