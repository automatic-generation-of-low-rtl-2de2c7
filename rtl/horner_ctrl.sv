// horner_ctrl: sequencer for a Horner evaluation that shares one multiply-add.
//
// A degree-d polynomial takes d multiply-add steps, one per clock, so a result
// is ready d cycles after the request (3 cycles for the degree-3 2^x operator).
// Step 0 starts from the leading coefficient p_d and the argument on the input
// port; steps k = 1..d-1 use the running value and the stored argument. Step k
// adds coefficient p_{d-1-k}.
//
// Interface: 'start' is sampled while idle (busy low); a start seen while busy
// is ignored. 'first' is high when step 0 is being issued (idle), 'acc_en'
// loads the running value, 'x_load' captures the argument, 'add_idx' addresses
// the coefficient to be added. 'done' is a one-cycle pulse in the cycle the
// result register holds the final value. Synchronous active-high reset.
module horner_ctrl #(
  parameter int unsigned DEGREE = poly_pkg::EXP2_DEGREE,
  parameter int unsigned AB     = $clog2(DEGREE + 1)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic          busy,
  output logic          first,
  output logic          acc_en,
  output logic          x_load,
  output logic [AB-1:0] add_idx,
  output logic          done
);

  logic [AB-1:0] step;        // index of the step issued this cycle while busy
  logic          last_step;

  always_comb begin
    first     = !busy;
    x_load    = !busy && start;
    acc_en    = busy || start;
    add_idx   = busy ? AB'(DEGREE - 1) - step : AB'(DEGREE - 1);
    last_step = busy ? (step == AB'(DEGREE - 1)) : (DEGREE == 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0;
      step <= '0;
      done <= 1'b0;
    end else begin
      done <= acc_en && last_step;
      if (!busy) begin
        if (start && DEGREE > 1) begin
          busy <= 1'b1;
          step <= AB'(1);
        end
      end else if (last_step) begin
        busy <= 1'b0;
        step <= '0;
      end else begin
        step <= step + AB'(1);
      end
    end
  end

  // A request is always answered exactly DEGREE cycles later.
  a_latency: assert property (@(posedge clk) disable iff (rst)
    (start && !busy) |-> ##(DEGREE) done);

endmodule
