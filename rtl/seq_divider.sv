// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// start loads dividend and divisor; W cycles later done pulses for one
// cycle with quotient = dividend / divisor (floor). busy is high in between.
// Division by zero returns all ones. Used by the error correction to form
// the ratio of cumulative to total histogram counts.
//
// Interface: clk, rst_n (async, active low), start, dividend, divisor in;
// quotient, busy, done out. Latency: W + 1 cycles from start to done.
module seq_divider #(
  parameter int unsigned W = 34
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic [W-1:0] quotient,
  output logic         busy,
  output logic         done
);

  logic [W-1:0]         den;
  logic [W-1:0]         rem;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0]           trial;

  assign trial = {rem, quotient[W-1]} - {1'b0, den};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      den <= '0; rem <= '0; quotient <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        den      <= divisor;
        rem      <= '0;
        quotient <= dividend;
        cnt      <= ($clog2(W+1))'(W);
        busy     <= 1'b1;
      end else if (busy) begin
        // shift the next dividend bit into the remainder, try to subtract
        if (!trial[W]) begin
          rem      <= trial[W-1:0];
          quotient <= {quotient[W-2:0], 1'b1};
        end else begin
          rem      <= {rem[W-2:0], quotient[W-1]};
          quotient <= {quotient[W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
