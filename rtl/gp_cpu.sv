// gp_cpu: top level of the 8-bit microprocessor with genetic instructions.
//
// An accumulator machine with a 16-bit address space, four addressing modes
// (immediate, direct, register indirect through Y, register based through
// BASE), a 16-bit stack pointer for CALL/RET and interrupts, 8-bit parallel
// and serial I/O, and six genetic instructions (three crossovers, inversion
// and two mutations) whose cut and mutation points come from an on-chip
// random number generator. Control is microprogrammed (gp_control with the
// store gp_urom); gp_datapath holds the registers, ALU and genetic unit;
// gp_io holds the I/O registers.
//
// Interface (as in the published pin diagram): 16-bit address AD15..AD0,
// 8-bit data D7..D0 (split here into `din`/`dout` with `mem_rd`/`mem_wr`
// strobes in place of a bidirectional bus), interrupt input, 8-bit parallel
// in and out, serial in and out. Memory timing: the address and strobes are
// valid for a whole clock cycle; a read returns data combinationally in the
// same cycle; a write happens at the rising clock edge that ends a cycle
// with `mem_wr` high. Reset (active low, asynchronous) starts execution at
// address 0000h. An interrupt (rising edge of `irq`) pushes the PC and
// jumps to INT_VECTOR; RET returns. The read/write strobes, the memory
// timing, the reset address and the vector are this design's choices.
// Every memory access is addressed by the datapath's MA register; an
// instruction takes 4 (register and I/O) to 9 clock cycles.
//
// The micro-PC, the register values, the interrupt status and the serial
// busy flag are brought to named nets here that nothing inside uses; they
// are kept so that a testbench or a debugger can watch them.
module gp_cpu
  import gp_pkg::*;
#(
  parameter logic [15:0] INT_VECTOR = 16'h0010,
  parameter logic [7:0]  RNG_SEED   = 8'hA5
) (
  input  logic        clk,
  input  logic        rst_n,
  // memory bus
  output logic [15:0] addr,
  input  logic [7:0]  din,
  output logic [7:0]  dout,
  output logic        mem_rd,
  output logic        mem_wr,
  // interrupt
  input  logic        irq,
  // parallel and serial I/O
  input  logic [7:0]  par_in,
  output logic [7:0]  par_out,
  input  logic        serial_in,
  output logic        serial_out
);

  uword_t      uw;
  logic [7:0]  upc;
  logic [7:0]  ir, ac, rng;
  logic        cf, zf, yzf;
  logic        irq_pending, int_ack;
  logic        pout_ld, sout_ld, sout_busy;
  logic [7:0]  pin_q, sin_q;
  logic [15:0] pc, sp, y, base, ma, md;

  gp_control u_ctrl (
    .clk (clk), .rst_n (rst_n), .ir (ir), .cf (cf), .zf (zf), .yzf (yzf),
    .irq (irq), .uw (uw), .upc (upc), .irq_pending (irq_pending),
    .int_ack (int_ack)
  );

  gp_datapath #(.INT_VECTOR(INT_VECTOR), .RNG_SEED(RNG_SEED)) u_dp (
    .clk (clk), .rst_n (rst_n), .uw (uw),
    .addr (addr), .din (din), .dout (dout), .mem_rd (mem_rd), .mem_wr (mem_wr),
    .pin_q (pin_q), .sin_q (sin_q), .pout_ld (pout_ld), .sout_ld (sout_ld),
    .ir (ir), .ac (ac), .cf (cf), .zf (zf), .yzf (yzf),
    .pc (pc), .sp (sp), .y (y), .base (base), .ma (ma), .md (md), .rng (rng)
  );

  gp_io u_io (
    .clk (clk), .rst_n (rst_n), .par_in (par_in), .serial_in (serial_in),
    .pout_ld (pout_ld), .sout_ld (sout_ld), .ac (ac),
    .pin_q (pin_q), .sin_q (sin_q), .par_out (par_out),
    .serial_out (serial_out), .sout_busy (sout_busy)
  );

  // a memory cycle is either a read or a write
  a_rd_wr_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
                                      !(mem_rd && mem_wr));

endmodule
