// dac_comparator_model -- behavioural model of the analog front end: an 8-bit
// DAC whose full scale is V_FULL (V_ref + alpha) followed by an analog voltage
// comparator with e_o on its + input and the DAC output on its - input. The two
// parts' combined propagation delay is modelled as DELAY_CYC clock cycles of
// delay on the DAC code. vcomp is high while e_o is above the DAC output.
// Simulation only; not part of the controller.
module dac_comparator_model #(
  parameter real V_FULL    = 1.7,
  parameter int  DELAY_CYC = 6
) (
  input  logic       clk,
  input  logic [7:0] cm,
  input  real        eo,
  output logic       vcomp,
  output real        vref_p
);

  logic [7:0] pipe [DELAY_CYC];

  initial for (int i = 0; i < DELAY_CYC; i++) pipe[i] = 8'd0;

  always @(posedge clk) begin
    pipe[0] <= cm;
    for (int i = 1; i < DELAY_CYC; i++) pipe[i] <= pipe[i-1];
  end

  always_comb begin
    vref_p = V_FULL * real'(pipe[DELAY_CYC-1]) / 255.0;
    vcomp  = eo > vref_p;
  end

endmodule
