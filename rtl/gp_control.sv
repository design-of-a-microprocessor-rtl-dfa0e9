// gp_control: microprogrammed control unit (microsequencer).
//
// Holds the micro-PC and reads the current microword from the microprogram
// store (gp_urom). Each clock the micro-PC moves to the address chosen by
// the microword's next-address field:
//   NX_SEQ   upc + 1            NX_JMP   uw.addr
//   NX_JCOND uw.addr if the selected condition (CF, ZF, YZF or a pending
//            interrupt) is true, else upc + 1
//   NX_DISP  the instruction routine picked by the mapping table from IR
//   NX_EXEC  the execute word for the op-code in IR
//   NX_END   U_INT if an interrupt is pending, else U_FETCH
// Interrupts are taken only between instructions (and from HALT). A rising
// edge on `irq` sets the pending latch; it clears as the sequencer enters
// the interrupt entry routine. The edge-triggered request and the test at
// instruction boundaries are this design's choices; only the presence of an
// interrupt input is given. Reset sends the micro-PC to U_FETCH.
// `uw` is combinational from the micro-PC register, so every control
// signal is valid from the start of the cycle.
module gp_control
  import gp_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [7:0]            ir,
  input  logic                  cf,
  input  logic                  zf,
  input  logic                  yzf,
  input  logic                  irq,
  output uword_t                uw,
  output logic [UADDR_BITS-1:0] upc,
  output logic                  irq_pending,
  output logic                  int_ack      // high in the cycle the interrupt is taken
);

  logic [UADDR_BITS-1:0] upc_next, disp_addr, exec_addr;
  logic                  irq_q;
  logic                  cond_true;

  gp_urom u_urom (
    .upc       (upc),
    .ir        (ir),
    .uw        (uw),
    .disp_addr (disp_addr),
    .exec_addr (exec_addr)
  );

  always_comb begin
    unique case (uw.cond)
      C_CF:    cond_true = cf;
      C_ZF:    cond_true = zf;
      C_YZF:   cond_true = yzf;
      default: cond_true = irq_pending;
    endcase
    unique case (uw.nx)
      NX_JMP:   upc_next = uw.addr;
      NX_JCOND: upc_next = cond_true ? uw.addr : upc + 8'd1;
      NX_DISP:  upc_next = disp_addr;
      NX_EXEC:  upc_next = exec_addr;
      NX_END:   upc_next = irq_pending ? U_INT : U_FETCH;
      default:  upc_next = upc + 8'd1;
    endcase
  end

  assign int_ack = (upc_next == U_INT) && (upc != U_INT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upc         <= U_FETCH;
      irq_q       <= 1'b0;
      irq_pending <= 1'b0;
    end else begin
      upc         <= upc_next;
      irq_q       <= irq;
      irq_pending <= (irq_pending && !int_ack) || (irq && !irq_q);
    end
  end

endmodule
