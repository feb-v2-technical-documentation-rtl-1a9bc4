// tdc_injection: test-signal generator selected by the TDC Control
// "Injection Mode" register.
//   0000 normal: TDC channels 0-31 take the PETIROC triggers (inj_sel = 0)
//   0001 a 1 kHz square wave (DIV_1KHZ bus cycles per half period) on all
//        34 TDC channels
//   0010 OFFSET bus cycles after each BC0, a one-cycle pulse on channels 0-31
//   0100 each BC0 pulses trig_ext of the two PETIROCs
//   1000 each Resync pulses trig_ext of the two PETIROCs
// inj_sel tells which TDC inputs are replaced by inj_hits. The modes come from
// the document; pulse lengths of one bus cycle are this design's choice.
module tdc_injection
  import feb_pkg::*;
#(
  parameter int DIV_1KHZ = 60000
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [3:0]       mode,
  input  logic [15:0]      offset,
  input  logic             bc0,
  input  logic             resync,
  output logic [N_CH-1:0]  inj_sel,
  output logic [N_CH-1:0]  inj_hits,
  output logic             trig_ext
);
  logic [$clog2(DIV_1KHZ)-1:0] div;
  logic sq;
  logic [15:0] dly;
  logic armed, pulse;

  always_ff @(posedge clk) begin
    if (rst) begin
      div <= '0; sq <= 1'b0; dly <= '0; armed <= 1'b0; pulse <= 1'b0; trig_ext <= 1'b0;
    end else begin
      if (div == ($clog2(DIV_1KHZ))'(DIV_1KHZ - 1)) begin
        div <= '0; sq <= ~sq;
      end else div <= div + 1'b1;
      pulse <= 1'b0;
      if (bc0) begin
        armed <= 1'b1; dly <= '0;
      end else if (armed) begin
        if (dly >= offset) begin
          armed <= 1'b0; pulse <= (mode == 4'b0010);
        end else dly <= dly + 1'b1;
      end
      trig_ext <= (mode == 4'b0100 && bc0) || (mode == 4'b1000 && resync);
    end
  end

  always_comb begin
    inj_sel  = '0;
    inj_hits = '0;
    unique case (mode)
      4'b0001: begin inj_sel = '1; inj_hits = {N_CH{sq}}; end
      4'b0010: begin inj_sel[N_ROC_CH-1:0] = '1; inj_hits[N_ROC_CH-1:0] = {N_ROC_CH{pulse}}; end
      default: ;
    endcase
  end
endmodule
