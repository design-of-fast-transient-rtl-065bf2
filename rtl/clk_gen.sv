// Clock generator of the LUT-based shift register.
//
// A shift request (req_u: shift up, req_d: shift down; slope compensation
// and coarse steps both arrive here) opens a SHIFTP pulse in its direction
// that lasts ctr_pwl+1 cycles. The first cycle of that pulse is the SHIFT
// strobe; further requests are ignored until the pulse ends, so ctr_pwl sets
// the shortest distance between two shifts. A rising edge of the overshoot
// flag os starts a pulse of ctr_os cycles during which both derived clocks
// are held: clk_f_en enables the fine loop, clk_c_en (= SHIFT outside that
// window) clocks the CTR_C register.
//
// Timing: all outputs are synchronous to clk, the comparator clock CMP_CLK.
// The silicon block forms the pulses with delay cells; here widths are
// counted in CMP_CLK cycles and the derived clocks are clock enables. The
// inputs and outputs (SHIFT_UorD, CTR_pwl, CTR_os[2:0], OS, SHIFT, CLK_C,
// CLK_F) follow the block diagram; the pulse widths in cycles, the 2-bit
// CTR_pwl and the meaning of the OS pulse as a hold window are this design's
// choices.
module clk_gen #(
  parameter int PWL_BITS = 2,
  parameter int OS_BITS  = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                req_u,
  input  logic                req_d,
  input  logic [PWL_BITS-1:0] ctr_pwl,
  input  logic                os,
  input  logic [OS_BITS-1:0]  ctr_os,
  output logic                shiftp_u,
  output logic                shiftp_d,
  output logic                shift,
  output logic                clk_c_en,
  output logic                clk_f_en
);

  logic [PWL_BITS-1:0] pw_cnt;
  logic                busy, dir_u;
  logic [OS_BITS-1:0]  os_cnt;
  logic                os_q, hold;

  assign shift = (req_u || req_d) && !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      dir_u  <= 1'b0;
      pw_cnt <= '0;
    end else if (shift) begin
      dir_u  <= req_u;
      busy   <= (ctr_pwl != '0);
      pw_cnt <= ctr_pwl;
    end else if (busy) begin
      pw_cnt <= pw_cnt - 1'b1;
      busy   <= (pw_cnt > 1);
    end
  end

  assign shiftp_u = (shift && req_u) || (busy && dir_u);
  assign shiftp_d = (shift && !req_u) || (busy && !dir_u);

  // Overshoot pulse generator.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      os_q   <= 1'b0;
      os_cnt <= '0;
    end else begin
      os_q <= os;
      if (os && !os_q)     os_cnt <= ctr_os;
      else if (os_cnt != 0) os_cnt <= os_cnt - 1'b1;
    end
  end

  assign hold     = (os_cnt != '0);
  assign clk_f_en = !hold;
  assign clk_c_en = shift && !hold;

endmodule
