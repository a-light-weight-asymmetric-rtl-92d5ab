// lidar_pkg: types and constants shared by the LiDAR PL design.
//
// Holds the application states of the LiDAR state machine (Init, Idle, FoV work,
// Blind work), the state-flag codes that the PL and the two PS cores write into
// the shared on-chip memory (N, F, I, B as printed in the process diagram, plus a
// code for INIT_DONE, which is this design's own), the word layout of one TDC
// serial word (upper 12 bits channel index, lower 20 bits pulse position), the
// shared-memory word addresses used for synchronisation, and the request and
// response structs of a shared-memory port.
//
// Lint note: when a module that uses only some of these constants is checked,
// the others are reported as unused.
package lidar_pkg;

  // ---------------------------------------------------------------- states
  typedef enum logic [1:0] {
    ST_INIT  = 2'd0,
    ST_IDLE  = 2'd1,
    ST_FOV   = 2'd2,
    ST_BLIND = 2'd3
  } lidar_state_e;

  // ----------------------------------------------------------- state flags
  // ASCII letters so a memory dump reads like the process diagram.
  typedef enum logic [7:0] {
    FLAG_NONE       = 8'h00,
    FLAG_INIT_DONE  = 8'h52,  // 'R' : all components ready (INIT_DONE)
    FLAG_NEXT_FRAME = 8'h4E,  // 'N' : NEXT_FRAME, written by the PL
    FLAG_FOV_DONE   = 8'h46,  // 'F' : FOV_DONE, written by PS core #1
    FLAG_CORE_SYNC  = 8'h49,  // 'I' : core #1 hands the frame to core #2
    FLAG_BLIND_DONE = 8'h42   // 'B' : BLIND_DONE
  } state_flag_e;

  // ------------------------------------------------------- TDC word layout
  localparam int unsigned SDO_BITS   = 32;
  localparam int unsigned INDEX_BITS = 12;
  localparam int unsigned POS_BITS   = 20;

  typedef struct packed {
    logic [INDEX_BITS-1:0] index;     // TDC channel index
    logic [POS_BITS-1:0]   position;  // virtual pulse position
  } tdc_word_t;

  // ------------------------------------------- shared memory (OCM) layout
  localparam int unsigned OCM_ADDR_BITS = 16;  // 64 Ki words of 32 bits = 256 KB
  localparam logic [OCM_ADDR_BITS-1:0] OCM_FLAG_ADDR    = 16'h0000;
  localparam logic [OCM_ADDR_BITS-1:0] OCM_IRQ_CNT_ADDR = 16'h0001;
  localparam logic [OCM_ADDR_BITS-1:0] OCM_MUTEX_ADDR   = 16'h0002;

  typedef struct packed {
    logic                     req;    // request, held until gnt
    logic                     we;     // write
    logic                     tas;    // atomic test-and-set: read old, write wdata
    logic [OCM_ADDR_BITS-1:0] addr;   // word address
    logic [31:0]              wdata;
  } ocm_req_t;

  typedef struct packed {
    logic        gnt;     // request accepted this cycle
    logic        rvalid;  // read data valid (one cycle after gnt)
    logic [31:0] rdata;
  } ocm_rsp_t;

endpackage
