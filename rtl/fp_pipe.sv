// fp_pipe: a pipeline register chain with a valid bit.
//
// A chain of LATENCY registers carrying a data word and its valid bit. The
// cores use it for their pipeline cuts (LATENCY 0 or 1: a cut that is
// absent or present) and for the registers that trail their output when a
// core is asked for more stages than it has cuts; with register retiming
// in synthesis those move back into the logic. A new word is accepted
// every cycle (initiation interval 1) and leaves LATENCY cycles later.
// Valid bits are reset (active-low asynchronous rst_n); data registers are
// not. LATENCY = 0 makes the chain a wire, leaving clk and rst_n unused.
module fp_pipe #(
  parameter int unsigned WIDTH   = 32,
  parameter int unsigned LATENCY = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data
);

  if (LATENCY == 0) begin : g_wire
    assign out_valid = in_valid;
    assign out_data  = in_data;
  end else begin : g_regs
    logic [LATENCY-1:0] v_q;
    logic [LATENCY-1:0][WIDTH-1:0] d_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) v_q <= '0;
      else        v_q <= LATENCY'({v_q, in_valid});
    end

    always_ff @(posedge clk) begin
      d_q <= (LATENCY*WIDTH)'({d_q, in_data});
    end

    assign out_valid = v_q[LATENCY-1];
    assign out_data  = d_q[LATENCY-1];
  end

endmodule
