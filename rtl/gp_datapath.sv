// gp_datapath: registers and data paths of the processor.
//
// Sixteen-bit registers PC, SP, Y, BASE, MA (memory address) and MD (memory
// data, halves MD_H and MD_L); eight-bit registers IR and AC; flags CF and
// ZF. YZF is not stored: it is 1 whenever Y is zero, so INC Y followed by BY
// closes a loop counted up from a negative start. PIN, SIN, POUT and SOUT
// live in gp_io; this block reads PIN/SIN and raises their load strobes.
//
// Every action is commanded by the current microword `uw`:
//   address bus  always MA, the memory address register, as in the
//                published datapath; memory read data arrives in the same
//                cycle (asynchronous read) and is written into IR, MD_L or
//                MD_H at the clock edge; writes put AC, PC_H or PC_L on
//                `dout` with `mem_wr` high for one cycle.
//   MA           <- PC, SP, MD, Y, BASE + MD (the base-address adder) or
//                MA + 1.
//   PC, SP, Y    increment, decrement and loads from MD as the fields say;
//                PC may also load the interrupt vector.
//   AC and flags the function field selects the ALU (gp_alu), the genetic
//                unit (gp_genetic) or a port value; ADD and CMP write CF and
//                ZF, AND/OR/XOR write ZF, CC clears CF. A genetic function
//                steps the random point generator (gp_rng) at the same edge.
// All registers reset to 0 except the random generator (RNG_SEED).
// The register set follows the published datapath; the microword fields,
// the asynchronous memory read and the reset values are this design's.
module gp_datapath
  import gp_pkg::*;
#(
  parameter logic [15:0] INT_VECTOR = 16'h0010,
  parameter logic [7:0]  RNG_SEED   = 8'hA5
) (
  input  logic        clk,
  input  logic        rst_n,
  input  uword_t      uw,
  // memory bus
  output logic [15:0] addr,
  input  logic [7:0]  din,
  output logic [7:0]  dout,
  output logic        mem_rd,
  output logic        mem_wr,
  // I/O registers
  input  logic [7:0]  pin_q,
  input  logic [7:0]  sin_q,
  output logic        pout_ld,
  output logic        sout_ld,
  // to the control unit and for observation
  output logic [7:0]  ir,
  output logic [7:0]  ac,
  output logic        cf,
  output logic        zf,
  output logic        yzf,
  output logic [15:0] pc,
  output logic [15:0] sp,
  output logic [15:0] y,
  output logic [15:0] base,
  output logic [15:0] ma,
  output logic [15:0] md,
  output logic [7:0]  rng
);

  logic [7:0] alu_y, gen_y;
  logic       alu_cf, alu_zf;

  gp_alu u_alu (
    .fn (uw.fn), .a (ac), .b (md[7:0]),
    .y  (alu_y), .cf (alu_cf), .zf (alu_zf)
  );

  gp_genetic u_gen (
    .fn (uw.fn), .ac (ac), .m (md[7:0]),
    .i  (rng[2:0]), .j (rng[5:3]), .y (gen_y)
  );

  gp_rng #(.SEED(RNG_SEED)) u_rng (
    .clk (clk), .rst_n (rst_n), .step (fn_is_genetic(uw.fn)), .value (rng)
  );

  // ------------------------------------------------------------ buses
  always_comb begin
    addr = ma;
    unique case (uw.mem)
      M_WR_PCH: dout = pc[15:8];
      M_WR_PCL: dout = pc[7:0];
      default:  dout = ac;
    endcase
  end

  assign mem_rd  = uw.mem inside {M_RD_IR, M_RD_MDL, M_RD_MDH, M_RD_MDL_CLRH};
  assign mem_wr  = uw.mem inside {M_WR_AC, M_WR_PCH, M_WR_PCL};
  assign pout_ld = (uw.fn == F_POUT);
  assign sout_ld = (uw.fn == F_SOUT);
  assign yzf     = (y == 16'h0000);

  // ------------------------------------------------------------ registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc <= '0; sp <= '0; y <= '0; base <= '0; ma <= '0; md <= '0;
      ir <= '0; ac <= '0; cf <= 1'b0; zf <= 1'b0;
    end else begin
      unique case (uw.mem)
        M_RD_IR:       ir <= din;
        M_RD_MDL:      md[7:0] <= din;
        M_RD_MDH:      md[15:8] <= din;
        M_RD_MDL_CLRH: md <= {8'h00, din};
        default: ;
      endcase

      unique case (uw.pc)
        PC_INC:    pc <= pc + 16'd1;
        PC_LD_MD:  pc <= md;
        PC_LD_VEC: pc <= INT_VECTOR;
        default: ;
      endcase

      unique case (uw.sp)
        SP_INC:   sp <= sp + 16'd1;
        SP_DEC:   sp <= sp - 16'd1;
        SP_LD_MD: sp <= md;
        default: ;
      endcase

      unique case (uw.ma)
        MA_LD_MD:     ma <= md;
        MA_LD_Y:      ma <= y;
        MA_LD_BASEMD: ma <= base + md;
        MA_INC:       ma <= ma + 16'd1;
        MA_LD_PC:     ma <= pc;
        MA_LD_SP:     ma <= sp;
        default: ;
      endcase

      unique case (uw.yb)
        YB_Y_INC:   y <= y + 16'd1;
        YB_Y_LD:    y <= md;
        YB_BASE_LD: base <= md;
        default: ;
      endcase

      unique case (uw.fn)
        F_ADD:                     begin ac <= alu_y; cf <= alu_cf; zf <= alu_zf; end
        F_CMP:                     begin cf <= alu_cf; zf <= alu_zf; end
        F_AND, F_OR, F_XOR:        begin ac <= alu_y; zf <= alu_zf; end
        F_LDA, F_COM, F_SHL, F_SHR,
        F_ROTL, F_ROTR:            ac <= alu_y;
        F_PIN:                     ac <= pin_q;
        F_SIN:                     ac <= sin_q;
        F_CC:                      cf <= 1'b0;
        F_XOVRML, F_XOVRMLM, F_XOVR2,
        F_INV, F_MUT1, F_MUT2:     ac <= gen_y;
        default: ;
      endcase
    end
  end

endmodule
