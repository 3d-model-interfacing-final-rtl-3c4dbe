// udiv_seq: sequential unsigned restoring divider.
//
// Computes quot = num / den (floor) one quotient bit per clock. A pulse on
// start loads the operands; WIDTH cycles later done pulses for one cycle
// and quot holds the result until the next start. busy is high in between.
// Division by zero returns all ones. This is a helper shared by the
// projection (divide by w) and the pixel shader (normalisation by |n|^2);
// it stands in for the reciprocal cores of the original implementation.
module udiv_seq #(
  parameter int WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] num,
  input  logic [WIDTH-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [WIDTH-1:0] quot
);
  localparam int CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] d_r, n_r;
  logic [WIDTH-1:0] rem;
  logic [WIDTH:0]   shifted;
  logic [CW-1:0]    cnt;
  logic [WIDTH:0]   trial;

  always_comb begin
    shifted = {rem, n_r[WIDTH-1]};
    trial   = shifted - {1'b0, d_r};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
      rem  <= '0;
      n_r  <= '0;
      d_r  <= '0;
      quot <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        cnt  <= CW'(WIDTH);
        rem  <= '0;
        n_r  <= num;
        d_r  <= den;
      end else if (busy) begin
        if (!trial[WIDTH]) begin
          rem <= trial[WIDTH-1:0];
          n_r <= {n_r[WIDTH-2:0], 1'b1};
        end else begin
          rem <= shifted[WIDTH-1:0];
          n_r <= {n_r[WIDTH-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          quot <= !trial[WIDTH] ? {n_r[WIDTH-2:0], 1'b1} : {n_r[WIDTH-2:0], 1'b0};
        end
      end
    end
  end
endmodule
