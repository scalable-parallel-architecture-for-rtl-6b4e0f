// dsp_inj_ctrl: Injection Current Controller of the dendrite segment processor.
//
// Adds the injection current term D_d = (dt / C_m) * I_inj to the voltage
// produced by the voltage processor when the node's injection flag (bit 64 of
// its data row) is set, and adds zero otherwise. This is the "Inj. adder" of
// the DSP core diagram. D_d is taken with the node, so the stimulus may change
// between simulation steps. Latency ADD_LAT clocks, one node per clock; the
// flag is carried through so the result can be written back with it.
module dsp_inj_ctrl #(
  parameter int ADD_LAT = 11
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [63:0] v_in,
  input  logic        inj,        // node has an injection current source
  input  logic [63:0] d_d,        // injection term
  output logic        out_valid,
  output logic [63:0] v_out,
  output logic        out_inj
);
  fp_add #(.LAT(ADD_LAT)) u_add (.clk, .rst_n, .in_valid, .a(v_in), .b(inj ? d_d : 64'd0),
                                 .out_valid, .y(v_out));
  delay_line #(.W(1), .DEPTH(ADD_LAT)) u_dly (.clk, .d(inj), .q(out_inj));
endmodule
