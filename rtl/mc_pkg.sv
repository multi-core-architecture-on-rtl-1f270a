// mc_pkg: types and constants shared by the multicore fabric.
//
// Every processor talks to its peripherals over an Avalon-MM style bus: the
// master holds read or write, address and writedata until a cycle in which
// the slave drops waitrequest; readdata is valid in that same cycle. The
// network interface decodes a 12-bit word address: bit 11 set selects the
// global router, bit 11 clear the neighbourhood network. The lower 11 bits
// carry a PE identity, 0 for the controller, or an I/O peripheral address
// (global router), or a direction 0..7 (neighbourhood network). The 32-bit
// data word, the 12-bit address, bit 11 as network select, the four router
// modes and the direction numbering follow the source description; the
// numeric mode codes, the 16-bit processor bus address and the structs are
// this design's own choices.
package mc_pkg;

  localparam int DATA_W     = 32;  // data word of every transfer
  localparam int NI_ADDR_W  = 12;  // network interface word address
  localparam int FIELD_W    = 11;  // identity / peripheral address / direction
  localparam int BUS_ADDR_W = 16;  // processor data bus word address

  // Identity of the controller on the global router; PEs are 1..N.
  localparam logic [FIELD_W-1:0] CTRL_ID = '0;

  // Communication modes of the global router, set by the controller's MODE
  // write (address 0x800).
  typedef enum logic [1:0] {
    MODE_PE_PE   = 2'd0,  // PE -> PE
    MODE_PE_CTRL = 2'd1,  // PE -> controller and controller -> PE
    MODE_PE_IO   = 2'd2,  // PE <-> I/O peripheral, and peripheral -> PE
    MODE_CTRL_IO = 2'd3   // controller <-> I/O peripheral
  } gr_mode_e;

  // Neighbourhood directions as numbered in the address field.
  typedef enum logic [2:0] {
    DIR_N  = 3'd0,
    DIR_E  = 3'd1,
    DIR_W  = 3'd2,
    DIR_S  = 3'd3,
    DIR_NE = 3'd4,
    DIR_NW = 3'd5,
    DIR_SE = 3'd6,
    DIR_SW = 3'd7
  } dir_e;

  // Avalon-MM request from a master and response from a slave.
  typedef struct packed {
    logic                  read;
    logic                  write;
    logic [BUS_ADDR_W-1:0] address;
    logic [DATA_W-1:0]     writedata;
  } avmm_req_t;

  typedef struct packed {
    logic [DATA_W-1:0] readdata;
    logic              waitrequest;
  } avmm_rsp_t;

  // Request from a network interface (or the I/O input) to the global router.
  typedef struct packed {
    logic               valid;
    logic               write;  // 1: SEND / MODE, 0: read from the I/O peripheral
    logic [FIELD_W-1:0] field;
    logic [DATA_W-1:0]  data;
  } gr_req_t;

  // Word delivered by the global router into the mailbox of identity `dest`.
  typedef struct packed {
    logic               valid;
    logic [FIELD_W-1:0] dest;
    logic [DATA_W-1:0]  data;
  } gr_dlv_t;

  // Request from a network interface to the neighbourhood network.
  typedef struct packed {
    logic              valid;
    logic              write;  // 1: SEND towards dir, 0: RECEIVE from dir
    dir_e              dir;
    logic [DATA_W-1:0] data;
  } nb_req_t;

  // Direction seen from the neighbour: data sent north arrives from the south.
  function automatic dir_e opposite(dir_e d);
    case (d)
      DIR_N:   return DIR_S;
      DIR_E:   return DIR_W;
      DIR_W:   return DIR_E;
      DIR_S:   return DIR_N;
      DIR_NE:  return DIR_SW;
      DIR_NW:  return DIR_SE;
      DIR_SE:  return DIR_NW;
      default: return DIR_NE;
    endcase
  endfunction

  // Row and column offsets of a direction (row 0 is the northern edge).
  function automatic int dir_drow(dir_e d);
    case (d)
      DIR_N, DIR_NE, DIR_NW: return -1;
      DIR_S, DIR_SE, DIR_SW: return 1;
      default:               return 0;
    endcase
  endfunction

  function automatic int dir_dcol(dir_e d);
    case (d)
      DIR_E, DIR_NE, DIR_SE: return 1;
      DIR_W, DIR_NW, DIR_SW: return -1;
      default:               return 0;
    endcase
  endfunction

endpackage
