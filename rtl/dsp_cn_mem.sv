// dsp_cn_mem: Common Node Voltage memory of a dendrite segment processor.
//
// Holds the voltages of the common nodes and somas that end this DSP's
// segments. Each of the DEPTH entries, addressed by the 8-bit INDEX field of
// a segment header, stores a voltage and the CNI it belongs to. Two read ports
// (start and end node of the segment in process) read combinationally. The
// communication media writes responses by CNI: a response is broadcast to all
// DSPs and every entry whose CNI matches takes the new voltage at the clock
// edge, so the switch needs no knowledge of INDEX values. The init port loads
// an entry's CNI and initial voltage before a simulation starts; it wins over
// a response in the same cycle.
module dsp_cn_mem #(
  parameter int DEPTH = 256
) (
  input  logic                     clk,
  // initialisation
  input  logic                     init_we,
  input  logic [$clog2(DEPTH)-1:0] init_idx,
  input  logic [31:0]              init_cni,
  input  logic [63:0]              init_volt,
  // response from the communication media
  input  logic                     rsp_valid,
  input  logic [31:0]              rsp_cni,
  input  logic [63:0]              rsp_volt,
  // read ports
  input  logic [$clog2(DEPTH)-1:0] ra_idx,
  output logic [63:0]              ra_volt,
  input  logic [$clog2(DEPTH)-1:0] rb_idx,
  output logic [63:0]              rb_volt
);
  logic [63:0] volt [DEPTH];
  logic [31:0] tag  [DEPTH];

  always_ff @(posedge clk) begin
    for (int i = 0; i < DEPTH; i++) begin
      if (init_we && init_idx == ($clog2(DEPTH))'(i)) begin
        volt[i] <= init_volt;
        tag[i]  <= init_cni;
      end else if (rsp_valid && tag[i] == rsp_cni) begin
        volt[i] <= rsp_volt;
      end
    end
  end

  assign ra_volt = volt[ra_idx];
  assign rb_volt = volt[rb_idx];
endmodule
