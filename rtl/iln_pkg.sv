// iln_pkg: types and constants shared by the Improved Logical Neighborhood
// (ILN) switch fabric.
//
// The fabric is an N x N multistage network (N = 8) built from n+1 = 4 stages
// of 8 switching elements (SE). Each SE has n+1 = 4 input and 4 output ports.
// Output port p < n is the p-cube link (next-stage row j ^ (1 << p)), port n is
// the straight link (same row). Every port is a 35-wire pipe: request and flag
// travel forward with the 32-bit data word, acknowledge travels backward.
//
// The SSM (sub switching module) control FSM talks to its functional units over
// a one-hot command bus. The bus below carries the thirteen functions A..M of
// the command table, one bit each, plus a clear bit used in IDLE and
// TERMINATION to return the units to their reset values. The bit packing and
// the field names are this design's own choice.
package iln_pkg;

  localparam int unsigned DATA_W      = 32;   // packet data lines per port
  localparam int unsigned LOG_N       = 3;    // n = log2(N)
  localparam int unsigned N_PORTS     = 8;    // N network ports
  localparam int unsigned SE_PORTS    = LOG_N + 1;  // ports per SE (4)
  localparam int unsigned N_STAGES    = LOG_N + 1;  // SE stages (4)
  localparam int unsigned N_SE        = N_PORTS * N_STAGES; // 32 SEs
  localparam int unsigned STRAIGHT    = LOG_N; // index of the straight port

  // Forward half of a port pipe (34 wires); the 35th wire, ack, runs backward
  // and is carried as a separate signal.
  typedef struct packed {
    logic              req;
    logic              flag;
    logic [DATA_W-1:0] data;
  } fwd_t;

  // Port request from an SSM to the output port selector: valid is the
  // control bit (MSB), port the wanted SE output port.
  typedef struct packed {
    logic       valid;
    logic [1:0] port;
  } prt_req_t;

  // Control FSM states (eleven, as in the SSM state diagram).
  typedef enum logic [3:0] {
    ST_IDLE        = 4'd0,
    ST_READY       = 4'd1,
    ST_ACKNOWLEDGE = 4'd2,
    ST_TRANSLATION = 4'd3,
    ST_ROUTING     = 4'd4,
    ST_REQUEST     = 4'd5,
    ST_DESTINATION = 4'd6,
    ST_TRANSPORT   = 4'd7,
    ST_SUSPEND     = 4'd8,
    ST_NEG_ACK     = 4'd9,
    ST_TERMINATION = 4'd10
  } ssm_state_t;

  // Command bus: one bit per functional-unit function.
  typedef struct packed {
    logic clear;        // '-' / '*' : units return to reset values
    logic a_opsel_wait; // A: timer - OPSel response delay
    logic b_next_wait;  // B: timer - next SE response delay
    logic c_dest_wait;  // C: timer - destination port response delay
    logic d_send_req;   // D: request - send request signal
    logic e_seek_port;  // E: router - seek SE output port
    logic f_send_data;  // F: translator - send packet data
    logic g_send_dest;  // G: translator - send destination address
    logic h_make_rv;    // H: translator - create routing vector
    logic i_send_nack;  // I: sensor - send negative acknowledgment
    logic j_send_ack;   // J: sensor - send positive acknowledgment
    logic k_sense_next; // K: sensor - sense next SE response
    logic l_sense_path; // L: sensor - sense path establishment acknowledgment
    logic m_sense_req;  // M: sensor - sense packet request
  } ssm_cmd_t;

  // Response bus from the functional units back to the control FSM.
  typedef struct packed {
    logic req_arrived;  // sensor: new packet request (rising ReqIn)
    logic req_present;  // sensor: ReqIn still asserted
    logic ack_sent;     // sensor: 2-cycle acknowledgment pulse finished
    logic next_ack;     // sensor: ACK sensed on AckIn (two cycles high)
    logic next_nack;    // sensor: NACK sensed on AckIn (one-cycle pulse)
    logic congested;    // sensor: AckIn dropped while a path is held
    logic rv_ready;     // translator: destination latched, vector built
    logic dest_sent;    // translator: destination word sent
    logic port_granted; // router: OPSel granted the sought port
    logic no_port;      // router: every candidate port has been tried
    logic expired;      // timer: selected delay has run out
  } ssm_rsp_t;

  // Cube neighbour of row j across dimension p.
  function automatic logic [LOG_N-1:0] cube(input logic [LOG_N-1:0] j, input int unsigned p);
    return j ^ (LOG_N'(1) << p);
  endfunction

endpackage
