// step_ctrl: sequencer of the m computation steps of a partitioned unit.
//
// A request (start high at a clock edge while idle, or while the last step
// of the previous operation is running) begins an operation: from the next
// cycle on, step counts 0, 1, ..., M-1, one step per clock cycle. first and
// last flag step 0 and step M-1; done equals busy && last, so an operation
// occupies exactly M cycles and its result is valid in the cycle done is
// high. The step number drives the operand multiplexers, and first drives
// the multiplexer that chooses between the initial value and the latched
// value of the data carried between steps. The design implies this control
// but does not describe it; the one-step-per-cycle timing is this design's
// choice.
module step_ctrl #(
  parameter int unsigned M  = 4,
  parameter int unsigned SW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  output logic [SW-1:0] step,
  output logic          first,
  output logic          last,
  output logic          done
);
  always_comb begin
    first = (step == '0);
    last  = (step == SW'(M - 1));
    done  = busy && last;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      step <= '0;
    end else if (busy && !last) begin
      step <= step + 1'b1;
    end else if (start) begin
      busy <= 1'b1;
      step <= '0;
    end else begin
      busy <= 1'b0;
      step <= '0;
    end
  end
endmodule
