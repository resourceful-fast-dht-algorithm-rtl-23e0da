// phase_ctrl: the control of the datapath.
//
// A free-running counter 0..SHARE-1 on the fast clock. Its value `phase`
// steers the multiplexers and demultiplexers of the shared constant
// multipliers; for SHARE = 4 its two bits are square waves at clk/2 and
// clk/4, the two interleaving clocks. `tick` is high in the last phase of
// every frame and acts as the frame clock enable: every frame register of the
// datapath loads on it, so one frame of N samples moves one stage forward per
// SHARE fast cycles. With SHARE = 1 tick is always high.
// Synchronous active-low reset starts the counter at phase 0.
module phase_ctrl #(
  parameter int SHARE = 4,
  localparam int PW   = dht_pkg::phase_w(SHARE)
) (
  input  logic          clk,
  input  logic          rst_n,
  output logic [PW-1:0] phase,
  output logic          tick
);

  always_ff @(posedge clk) begin
    if (!rst_n)                        phase <= '0;
    else if (phase == PW'(SHARE - 1))  phase <= '0;
    else                               phase <= phase + 1'b1;
  end

  assign tick = (phase == PW'(SHARE - 1));

endmodule
