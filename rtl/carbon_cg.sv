// carbon_cg: one coarse-grain processing element (CG) of CARBON-Razor.
//
// The CG runs a time-multiplexed schedule: one 81-bit instruction per system
// clock from a 256-entry instruction memory, the user clock being the system
// clock divided by the schedule length.  Each instruction reads two ALU
// operands and one crossbar value from the five operand memories (N, S, E, W
// hold words written by the neighbours, R holds local values and
// constants), computes a 32-bit ALU result truncated to the instruction's
// width, and may write the result into R and, through the crossbar, either
// the result or the crossbar value into the facing memory of any neighbour.
//
// Pipeline (all memories are synchronous-read block RAMs):
//   cycle t   : instruction memory read at the fetch address
//   cycle t+1 : ir_d holds the instruction; its read addresses go to the
//               operand memories
//   cycle t+2 : ir_e executes; operands arrive, ALU, writes at the clock edge
// The last instruction of the schedule carries the 'last' flag.  When it
// moves into execute, instruction 0 is fetched for the next user cycle and
// held in ir_d (re-read, and its operand reads repeated, every clock) until go starts the
// next user cycle; go may arrive while 'last' executes, so back-to-back
// user cycles lose no clock.  done is high when the CG could start the next
// user cycle on the next clock.  A go that arrives while the CG is not done
// is remembered and used as soon as it is.
//
// Razor: mem_err from any memory or a stall from a neighbour raises
// count_stall (carbon_stall_ctrl), which freezes fetch, ir_d and ir_e for
// one clock, blocks all writes by this CG and re-reads the operands of the
// instruction in ir_e; the memories reload their shadow registers as
// directed by the stall control.  A CG that has finished its schedule and
// waits for go ignores stalls: by then the wave has gone as far as it needs
// to, and restarting the schedule clears the error history: in the clock
// in which go restarts the CG, neighbour and edge writes are not delayed.
//
// LOAD/STORE: STORE writes operand B into R at the address held in operand
// A (one clock).  LOAD takes two schedule slots: its operand A value is the
// address at which the next instruction's operand A is read.  LOAD must not
// be the last instruction of a schedule.
//
// Warnings: UNUSEDSIGNAL on ir_e[4:0]: the four spare bits are unused, and
// the last flag is used while the instruction is in ir_d, not in ir_e.
//
// Ports: imem_* writes one instruction per clock (configuration).  in_* are
// the neighbours' writes into this CG's N/S/E/W memories, out_* this CG's
// writes into the facing memories of its N/S/E/W neighbours (index 0 N,
// 1 S, 2 E, 3 W).  err_inject models late-arriving write data per memory
// (simulation of timing errors; tie to 0 in use).
// The structure, the two-cycle fetch and the stall behaviour follow the
// CARBON-Razor CG; the instruction fields, the go/done handshake and the
// error-injection port are this design's own.
module carbon_cg
  import carbon_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 imem_we,
  input  logic [PC_W-1:0]      imem_addr,
  input  instr_t               imem_wdata,
  input  logic                 go,
  output logic                 done,
  input  logic [3:0]           in_we,
  input  addr_t [3:0]          in_addr,
  input  word_t [3:0]          in_data,
  input  word_t [4:0]          err_inject,
  output logic [3:0]           out_we,
  output addr_t [3:0]          out_addr,
  output word_t [3:0]          out_data,
  input  logic [3:0]           stall_in,
  output logic [3:0]           stall_out,
  output logic                 count_stall,
  output logic                 exec,          // an instruction executes this clock
  output logic [PC_W-1:0]      pc_e           // its schedule index
);
  instr_t         imem [2**PC_W];
  instr_t         ir_d, ir_e;
  logic [PC_W-1:0] pc_d;
  logic           d_valid, d_next, e_valid, go_pend;
  logic           start, hold_d, idle;
  logic [PC_W-1:0] fa;

  logic [4:0]     mem_err;
  logic [3:0]     load_shadow;
  logic           load_shadow_r;
  word_t          rdata [NMEM][3];
  addr_t          raddr [3];
  word_t          a_val, b_val, x_val, alu_y;
  logic           ld_now, ld_pend;
  addr_t          ld_addr;

  // ---------------- fetch / decode / execute control ----------------
  assign start  = go | go_pend;
  assign hold_d = d_next & ~start;
  assign fa     = (!d_valid || ir_d.last) ? '0 : pc_d + 1'b1;
  assign done   = d_next & ~count_stall;
  // Waiting for go with nothing in execute: a late stall wave or a memory
  // error (which the memory corrects by itself) needs no stall here.
  assign idle   = d_next & ~e_valid;

  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_addr] <= imem_wdata;
    // while waiting for go, ir_d re-reads its own address so that a
    // configuration written after reset is picked up
    if (!count_stall) ir_d <= imem[hold_d ? pc_d : fa];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      d_valid <= 1'b0;
      d_next  <= 1'b0;
      e_valid <= 1'b0;
      go_pend <= 1'b0;
      pc_d    <= '0;
      pc_e    <= '0;
      ir_e    <= '0;
    end else begin
      if (go) go_pend <= 1'b1;
      if (!count_stall) begin
        if (hold_d) begin
          e_valid <= 1'b0;
        end else begin
          ir_e    <= ir_d;
          pc_e    <= pc_d;
          e_valid <= d_valid;
          pc_d    <= fa;
          d_valid <= 1'b1;
          d_next  <= !d_valid || ir_d.last;
          if (d_next) go_pend <= 1'b0;
        end
      end
    end
  end

  // ---------------- operand memories ----------------
  // Operand reads are issued one clock ahead for the instruction in ir_d.
  // During a stall the instruction in ir_e is executed again next clock, so
  // its own operands are read again (picking up the corrected words).
  // LOAD (two clocks): while LOAD executes, operand A of the next
  // instruction is read at the address LOAD's own operand A holds, instead
  // of the address in that instruction; ld_addr keeps it for a re-read if
  // the next instruction is stalled.
  assign ld_now = exec && ir_e.op == OP_LOAD;
  always_ff @(posedge clk) begin
    if (rst) begin
      ld_pend <= 1'b0;
      ld_addr <= '0;
    end else if (exec) begin
      ld_pend <= ld_now;
      ld_addr <= a_val[ADDR_W-1:0];
    end
  end
  assign raddr[0] = count_stall ? (ld_pend ? ld_addr : ir_e.a_addr)
                  : (ld_now ? a_val[ADDR_W-1:0] : ir_d.a_addr);
  assign raddr[1] = count_stall ? ir_e.b_addr : ir_d.b_addr;
  assign raddr[2] = count_stall ? ir_e.x_addr : ir_d.x_addr;

  assign exec = e_valid & ~count_stall;

  for (genvar m = 0; m < NMEM; m++) begin : g_mem
    logic  m_we, m_ls;
    addr_t m_waddr;
    word_t m_wdata;
    if (m == M_R) begin : g_r
      assign m_we    = exec & ir_e.r_we;
      assign m_waddr = (ir_e.op == OP_STORE) ? a_val[ADDR_W-1:0] : ir_e.r_addr;
      assign m_wdata = alu_y;
      assign m_ls    = load_shadow_r;
    end else begin : g_nb
      assign m_we    = in_we[m];
      assign m_waddr = in_addr[m];
      assign m_wdata = in_data[m];
      // the clock in which go restarts a done CG resynchronises the whole
      // array, so writes in it (for instruction 0) are never delayed
      assign m_ls    = load_shadow[m] & ~(start & done);
    end
    carbon_mem u_mem (
      .clk(clk), .rst(rst), .we(m_we), .waddr(m_waddr), .wdata(m_wdata),
      .err_inject(err_inject[m]), .load_shadow(m_ls),
      .raddr(raddr), .rdata(rdata[m]), .mem_err(mem_err[m])
    );
  end

  function automatic word_t pick(src_e sel, logic [1:0] port);
    return (sel <= SRC_R) ? rdata[sel][port] : '0;
  endfunction

  assign a_val = pick(ir_e.a_sel, 2'd0);
  assign b_val = pick(ir_e.b_sel, 2'd1);
  assign x_val = pick(ir_e.x_sel, 2'd2);

  carbon_alu u_alu (
    .op(ir_e.op), .width_m1(ir_e.width_m1), .a(a_val), .b(b_val), .imm(ir_e.imm), .y(alu_y)
  );

  // ---------------- crossbar / neighbour writes ----------------
  for (genvar d = 0; d < 4; d++) begin : g_out
    assign out_we[d]   = exec & ir_e.out[d].we;
    assign out_addr[d] = ir_e.out[d].addr;
    assign out_data[d] = ir_e.out[d].use_x ? x_val : alu_y;
  end

  // ---------------- Razor stall control ----------------
  carbon_stall_ctrl u_stall (
    .clk(clk), .rst(rst), .mem_err(mem_err & {5{~idle}}), .stall_in(stall_in & {4{~idle}}),
    .stall_out(stall_out), .load_shadow(load_shadow), .load_shadow_r(load_shadow_r),
    .count_stall(count_stall)
  );
endmodule
