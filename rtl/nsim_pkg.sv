// nsim_pkg: types and constants shared by the neural simulator blocks.
//
// All membrane voltages, conductances and coefficients are IEEE-754 double
// precision numbers (64 bits). Processors exchange "messages": a 32-bit
// common node id (CNI), the 2-bit end-node status of Table-style encoding
// (00 open, 01 parent segment, 10 child 1, 11 child 2) and a 64-bit voltage.
// A DSP sends a message as a request (CNI of the common node or soma plus the
// voltage of the compartment next to it); a CNP or SP answers with a message
// that carries the CNI and the updated node voltage.
//
// Segment Definition Packet rows are 66 bits wide. Header row 0/1 layout:
// [31:0] CNI, [39:32] INDEX into the DSP's common node voltage memory,
// [47:40] number of nodes (row 0 only), [63:48] unused, [65:64] status.
// Header rows 2..4 hold A_d, B_d, C_d in bits [63:0]. Data rows hold a node
// voltage in [63:0] and the injection-current flag in bit 64.
package nsim_pkg;

  typedef logic [63:0] fp64_t;
  typedef logic [65:0] sdp_row_t;

  typedef enum logic [1:0] {
    ST_OPEN   = 2'b00,   // end of segment not connected
    ST_PARENT = 2'b01,   // connected, this segment is the parent
    ST_CHILD1 = 2'b10,   // connected, this segment is child 1
    ST_CHILD2 = 2'b11    // connected, this segment is child 2
  } end_status_e;

  typedef struct packed {
    logic [31:0] cni;
    logic [1:0]  status;
    fp64_t       volt;
  } msg_t;

  localparam int MSG_W = $bits(msg_t);

  // Decoded segment header, as presented by the header processor.
  typedef struct packed {
    logic [31:0] start_cni;
    logic [7:0]  start_idx;
    logic [1:0]  start_status;
    logic [7:0]  num_nodes;
    logic [31:0] end_cni;
    logic [7:0]  end_idx;
    logic [1:0]  end_status;
    fp64_t       a_d;
    fp64_t       b_d;
    fp64_t       c_d;
  } seg_hdr_t;

  // Number of header rows of a Segment Definition Packet.
  localparam int SDP_HDR_ROWS = 5;

  // Configuration targets of the soma processor.
  typedef enum logic [3:0] {
    SP_AS, SP_BS, SP_CS, SP_DS, SP_ES, SP_FS,   // per soma coefficients of Eq. (3.7)
    SP_V0, SP_GK, SP_GNA,                        // per soma state
    SP_N, SP_M, SP_H,                            // per soma gate probabilities
    SP_LUT_A, SP_LUT_B,                          // A(k)/B(k) tables, gate chosen by cfg_gate
    SP_GBAR_K, SP_GBAR_NA                        // normalisation constants
  } sp_cfg_e;

  typedef enum logic [1:0] {GATE_N = 2'd0, GATE_M = 2'd1, GATE_H = 2'd2} gate_e;

  // Configuration targets of the common node processor.
  typedef enum logic [2:0] {
    CN_AC, CN_BC, CN_CC, CN_DC, CN_EC, CN_V0
  } cn_cfg_e;

endpackage
