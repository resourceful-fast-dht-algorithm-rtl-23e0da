// frame_delay: delays a frame of NW words by D frames.
//
// A chain of D register banks, each loading on the frame clock enable ce,
// used to balance the latencies of the even and odd branches of a
// split-radix level. D = 0 is a plain connection. Synchronous active-low
// reset clears the registers.
module frame_delay #(
  parameter int NW = 1,
  parameter int W  = 23,
  parameter int D  = 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ce,
  input  logic signed [W-1:0] d [NW],
  output logic signed [W-1:0] q [NW]
);

  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic signed [W-1:0] r [D][NW];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int k = 0; k < D; k++)
          for (int i = 0; i < NW; i++) r[k][i] <= '0;
      end else if (ce) begin
        r[0] <= d;
        for (int k = 1; k < D; k++) r[k] <= r[k-1];
      end
    end
    assign q = r[D-1];
  end

endmodule
