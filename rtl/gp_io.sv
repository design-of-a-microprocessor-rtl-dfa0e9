// gp_io: parallel and serial I/O registers PIN, SIN, POUT and SOUT.
//
// PIN samples the 8-bit parallel input every clock; the PIN instruction
// copies it to AC. SIN is a shift register that takes the serial input bit
// into bit 0 every clock, shifting towards bit 7; the SIN instruction copies
// the last eight bits received to AC. POUT is loaded from AC by `pout_ld`
// (POUT instruction) and drives the parallel output. SOUT is loaded from AC
// by `sout_ld` (SOUT instruction) and then sent LSB first on `serial_out`,
// one bit per clock: bit 0 is on the line the cycle after the load, and the
// register shifts right (filling 0) on each of the next 8 clocks, then holds.
// `sout_busy` is high while bits remain to be sent. The registers and their
// widths are given; the serial framing (no start/stop bits, one bit per
// clock) is this design's choice.
module gp_io (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] par_in,
  input  logic       serial_in,
  input  logic       pout_ld,
  input  logic       sout_ld,
  input  logic [7:0] ac,
  output logic [7:0] pin_q,
  output logic [7:0] sin_q,
  output logic [7:0] par_out,
  output logic       serial_out,
  output logic       sout_busy
);

  logic [7:0] sout_q;
  logic [3:0] sout_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pin_q    <= '0;
      sin_q    <= '0;
      par_out  <= '0;
      sout_q   <= '0;
      sout_cnt <= '0;
    end else begin
      pin_q <= par_in;
      sin_q <= {sin_q[6:0], serial_in};
      if (pout_ld) par_out <= ac;
      if (sout_ld) begin
        sout_q   <= ac;
        sout_cnt <= 4'd8;
      end else if (sout_cnt != 4'd0) begin
        sout_q   <= {1'b0, sout_q[7:1]};
        sout_cnt <= sout_cnt - 4'd1;
      end
    end
  end

  assign serial_out = sout_q[0];
  assign sout_busy  = (sout_cnt != 4'd0);

endmodule
