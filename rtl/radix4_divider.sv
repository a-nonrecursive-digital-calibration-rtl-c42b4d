// radix4_divider: sequential unsigned fixed-point divider,
// quot = floor(num * 2^QFRAC / den), saturated to Q_W bits.
//
// Restoring long division that retires two quotient bits per clock (radix 4):
// each step shifts the partial remainder left by two dividend bits and
// compares it with den, 2*den and 3*den in parallel to pick the digit 0..3.
// The part of the dividend above the Q_W quotient bits is loaded into the
// remainder in the start cycle; if it is not below den (or den is zero) the
// quotient would not fit and the result saturates to all ones, flagged by
// ovf.
//
// Interface: pulse start with num/den valid; done pulses for one cycle with
// quot/ovf valid, held until the next start. Timing: 1 load edge plus Q_W/2
// digit edges, i.e. 9 cycles for the default 16-bit quotient, the paper's
// division latency. The radix-4 restoring scheme is this design's choice.
module radix4_divider #(
  parameter int unsigned IN_W  = 17,  // width of num and den
  parameter int unsigned Q_W   = 16,  // quotient bits, must be even
  parameter int unsigned QFRAC = 14   // fractional bits of the quotient
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic [IN_W-1:0] num,
  input  logic [IN_W-1:0] den,
  output logic            busy,
  output logic            done,
  output logic [Q_W-1:0]  quot,
  output logic            ovf
);

  localparam int unsigned STEPS = Q_W / 2;
  localparam int unsigned X_W   = IN_W + QFRAC;     // width of num * 2^QFRAC
  localparam int unsigned R_W   = IN_W + 2;
  localparam int unsigned CNT_W = $clog2(STEPS + 1);

  logic [X_W-1:0]   x_full;
  logic [X_W-1:0]   hi_part;   // dividend bits above the quotient window
  logic [Q_W-1:0]   lo_q;      // dividend bits still to be brought down
  logic [R_W-1:0]   rem_q, rem4, d1, d2, d3;
  logic [IN_W-1:0]  den_q;
  logic [CNT_W-1:0] cnt_q;
  logic [1:0]       digit;
  logic [R_W-1:0]   rem_nxt;
  logic             ovf_q;

  assign x_full  = X_W'(num) << QFRAC;
  assign hi_part = x_full >> Q_W;

  always_comb begin
    rem4 = {rem_q[R_W-3:0], lo_q[Q_W-1 -: 2]};
    d1   = R_W'(den_q);
    d2   = R_W'(den_q) << 1;
    d3   = d1 + d2;
    if (rem4 >= d3) begin
      digit = 2'd3; rem_nxt = rem4 - d3;
    end else if (rem4 >= d2) begin
      digit = 2'd2; rem_nxt = rem4 - d2;
    end else if (rem4 >= d1) begin
      digit = 2'd1; rem_nxt = rem4 - d1;
    end else begin
      digit = 2'd0; rem_nxt = rem4;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      quot  <= '0;
      ovf   <= 1'b0;
      ovf_q <= 1'b0;
      rem_q <= '0;
      lo_q  <= '0;
      den_q <= '0;
      cnt_q <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy  <= 1'b1;
        cnt_q <= '0;
        den_q <= den;
        rem_q <= R_W'(hi_part);
        lo_q  <= x_full[Q_W-1:0];
        ovf_q <= (den == '0) || (hi_part >= X_W'(den));
        quot  <= '0;
      end else if (busy) begin
        rem_q <= rem_nxt;
        lo_q  <= lo_q << 2;
        quot  <= {quot[Q_W-3:0], digit};
        cnt_q <= cnt_q + 1'b1;
        if (cnt_q == CNT_W'(STEPS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          ovf  <= ovf_q;
          if (ovf_q) quot <= '1;
        end
      end
    end
  end

endmodule
