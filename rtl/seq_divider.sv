// seq_divider -- unsigned restoring divider, one quotient bit per clock.
//
// Used once per frame by the approximate module to form the rounded grid
// width of a source pixel. `start` loads the operands; `done` pulses N clocks
// later with quotient and remainder valid (they stay valid until the next
// start). A zero divisor gives an all-ones quotient.
module seq_divider #(
  parameter int N = 17,   // dividend and quotient width
  parameter int D = 13    // divisor width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] dividend,
  input  logic [D-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [N-1:0] quotient,
  output logic [D-1:0] remainder
);

  logic [N-1:0]   q;      // shifts out dividend bits, shifts in quotient bits
  logic [D-1:0]   r;      // partial remainder, always below the divisor
  logic [D-1:0]   dvs;
  logic [$clog2(N+1)-1:0] cnt;
  logic [D:0]     r_sh, r_sub;

  always_comb begin
    r_sh  = {r, q[N-1]};
    r_sub = r_sh - {1'b0, dvs};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; r <= '0; dvs <= '0; cnt <= '0;
      busy <= 1'b0; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        q    <= dividend;
        r    <= '0;
        dvs  <= divisor;
        cnt  <= ($clog2(N+1))'(N);
        busy <= 1'b1;
      end else if (busy) begin
        if (!r_sub[D]) begin
          r <= r_sub[D-1:0];
          q <= {q[N-2:0], 1'b1};
        end else begin
          r <= r_sh[D-1:0];
          q <= {q[N-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = q;
  assign remainder = r;

endmodule
