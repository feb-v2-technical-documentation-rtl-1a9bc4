// petiroc_model: behavioural model of the PETIROC slow-control shift
// register, for testbenches only. On each rising sr_ck the register shifts
// towards its MSB and takes sr_in at bit 0; sr_out is the MSB. sr_rstb low
// clears it.
module petiroc_model #(
  parameter int NBITS = 664
) (
  input  logic sr_ck,
  input  logic sr_in,
  input  logic sr_rstb,
  output logic sr_out
);
  logic [NBITS-1:0] sr = '0;
  always @(posedge sr_ck or negedge sr_rstb)
    if (!sr_rstb) sr <= '0;
    else sr <= {sr[NBITS-2:0], sr_in};
  assign sr_out = sr[NBITS-1];
endmodule
