// Average unit: unsigned restoring divider, one quotient bit per clock.
//
// Used in the averaging configurations of the Reduce accelerator to turn the
// accumulated sum of a key into its mean (sum / count) when the key is read.
// The published design names the averaging function only; the sequential
// divider is this implementation's choice, sized for one read at a time.
// Timing: start is taken when busy is low; done pulses DW+1 clocks later with
// quot = dividend / divisor (truncated). A zero divisor gives all ones.
//
// How: the divisor is only SW bits wide, so the partial remainder needs SW
// bits and each step is one SW+1-bit subtraction; the quotient shifts in
// from the right.
module avg_divider #(
  parameter int unsigned DW = 32,   // dividend and quotient width
  parameter int unsigned SW = 7     // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [SW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] quot
);

  logic [DW-1:0]          q;
  logic [SW-1:0]          rem;      // remainder, always below the divisor
  logic [SW-1:0]          dvs;
  logic [$clog2(DW+1)-1:0] step;
  logic [SW+1:0]          trial;    // shifted remainder minus divisor, with sign

  assign trial = {1'b0, rem, q[DW-1]} - {2'b00, dvs};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0; rem <= '0; dvs <= '0; step <= '0; busy <= 1'b0; done <= 1'b0; quot <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          q    <= dividend;
          dvs  <= divisor;
          rem  <= '0;
          step <= '0;
          busy <= 1'b1;
        end
      end else if (step == ($clog2(DW+1))'(DW)) begin
        busy <= 1'b0;
        done <= 1'b1;
        quot <= (dvs == '0) ? '1 : q;
      end else begin
        // Shift the next dividend bit into the remainder and try to subtract.
        if (!trial[SW+1]) begin
          rem <= trial[SW-1:0];
          q   <= {q[DW-2:0], 1'b1};
        end else begin
          rem <= {rem[SW-2:0], q[DW-1]};
          q   <= {q[DW-2:0], 1'b0};
        end
        step <= step + 1'b1;
      end
    end
  end

endmodule
