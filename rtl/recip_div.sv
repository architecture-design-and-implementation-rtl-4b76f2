// recip_div: sequential reciprocal, q = floor(2**NUM_SH / den).
//
// Restoring long division, one quotient bit per cycle from the most
// significant one: the numerator is a single 1 followed by NUM_SH zeros.
// It provides the 1/(2 sigma^2) factor of the LLR scaling, which the
// source names as a reciprocal division without giving its structure; the
// bit-serial form is this design's choice. den = 0 returns all ones.
//
// Timing: `done` pulses NUM_SH + 1 cycles after `start`; `q` then holds
// until the next start. `den` is sampled at start.
module recip_div #(
  parameter int DEN_W  = 24,
  parameter int NUM_SH = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [DEN_W-1:0]  den,
  output logic              done,
  output logic [NUM_SH:0]   q
);
  localparam int CW = $clog2(NUM_SH + 2);
  logic             busy;
  logic [DEN_W-1:0] dreg;
  logic [DEN_W:0]   rem, rem_sh;
  logic [CW-1:0]    i;        // bit being formed
  logic             nbit;

  assign nbit   = (int'(i) == NUM_SH);
  assign rem_sh = {rem[DEN_W-1:0], nbit};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      dreg <= '0;
      rem  <= '0;
      i    <= '0;
      q    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        dreg <= den;
        rem  <= '0;
        i    <= CW'(NUM_SH);
        q    <= '0;
      end else if (busy) begin
        if (dreg == 0) begin
          q    <= '1;
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          if (rem_sh >= {1'b0, dreg}) begin
            rem  <= rem_sh - {1'b0, dreg};
            q[i] <= 1'b1;
          end else begin
            rem  <= rem_sh;
          end
          if (i == 0) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            i <= i - 1'b1;
          end
        end
      end
    end
  end
endmodule
