// abc_pkg: types and constants shared by the ABCStar digital blocks.
//
// The strip count (256), the 12-bit cluster, the 40 MHz BC / 160 MHz readout
// clocks and the packet layout (3 start bits, 4-bit TYP, 8-bit L0ID, 4-bit BCID,
// one to four 12-bit clusters, 1 trailer bit) follow the ABCStar description.
// The bit values chosen for the start bits, trailer, TYP codes, cluster layout,
// command frame and register map are this design's own choices.
package abc_pkg;

  localparam int unsigned NSTRIPS    = 256;  // strips per chip
  localparam int unsigned L0ID_W     = 8;    // L0ID field of a packet
  localparam int unsigned BCID_W     = 4;    // BCID field of a packet
  localparam int unsigned TYP_W      = 4;    // TYP field of a packet
  localparam int unsigned CLUS_W     = 12;   // one cluster word
  localparam int unsigned MAX_CLUS   = 4;    // clusters per packet
  localparam int unsigned CHIPID_W   = 4;    // chip identification (assumed width)
  localparam int unsigned REG_AW     = 8;    // register address
  localparam int unsigned REG_DW     = 32;   // register data
  localparam int unsigned MASK_WORDS = NSTRIPS / REG_DW;

  // Packet framing
  localparam logic [2:0] START_BITS = 3'b110;
  localparam logic       TRAILER    = 1'b0;
  localparam int unsigned PKT_MAX_BITS = 3 + TYP_W + L0ID_W + BCID_W + MAX_CLUS*CLUS_W + 1; // 68

  // Packet types
  typedef enum logic [TYP_W-1:0] {
    TYP_PR  = 4'h1,   // event read out on a PR request
    TYP_LP  = 4'h2,   // event read out on an LP request
    TYP_REG = 4'h3    // register read-back
  } typ_e;

  // A cluster word: last-of-event flag, address of the first hit strip and
  // the hit pattern of the three strips above it.
  typedef struct packed {
    logic       last;
    logic [7:0] addr;
    logic [2:0] next;
  } cluster_t;

  // Cluster word sent for an event with no hit strip (address 255 cannot
  // have neighbours above it, so this word never describes a real cluster).
  localparam cluster_t NO_CLUSTER = '{last: 1'b1, addr: 8'hFF, next: 3'b111};

  // Header that travels with an event from the EvtBuffer to the packet.
  typedef struct packed {
    typ_e              typ;
    logic [L0ID_W-1:0] l0id;
    logic [BCID_W-1:0] bcid;
  } evt_tag_t;

  // A packet as handed from the BC domain to the serializer.
  typedef struct packed {
    evt_tag_t                    tag;
    logic [1:0]                  nclus_m1;   // number of cluster words - 1
    logic [MAX_CLUS*CLUS_W-1:0]  payload;    // word 0 in the top bits
  } packet_t;

  // Edge detection modes (TABLE I of the ABCStar description)
  typedef enum logic [1:0] {
    EDGE_HIT   = 2'b00,
    EDGE_LEVEL = 2'b01,
    EDGE_EDGE  = 2'b10,
    EDGE_CLEAR = 2'b11
  } edge_mode_e;

  // Input register working modes
  typedef enum logic [1:0] {
    WM_DATA  = 2'b00,   // normal data taking
    WM_BCID  = 2'b01,   // test: BCID printed into the strips
    WM_MASK  = 2'b10,   // test: mask bits loaded as hits
    WM_PULSE = 2'b11    // test: digital test pulse on unmasked strips
  } work_mode_e;

  // Command frame on the CMD bit stream: start bit, opcode, chip ID,
  // register address, register data.
  typedef enum logic [2:0] {
    OP_WRITE   = 3'd0,
    OP_READ    = 3'd1,
    OP_SOFTRST = 3'd2,
    OP_CNTRST  = 3'd3,
    OP_PULSE   = 3'd4
  } cmd_op_e;
  localparam int unsigned CMD_FRAME_BITS = 1 + 3 + CHIPID_W + REG_AW + REG_DW; // 48
  localparam int unsigned TRIG_FRAME_BITS = 1 + L0ID_W;                        // 9
  localparam logic [CHIPID_W-1:0] CHIPID_BROADCAST = '1;

  // Register map
  localparam logic [REG_AW-1:0] ADDR_CFG  = 8'h00;  // [1:0] edge mode, [3:2] working mode
  localparam logic [REG_AW-1:0] ADDR_LAT  = 8'h01;  // [8:0] L0 latency in BCs
  localparam logic [REG_AW-1:0] ADDR_MASK = 8'h10;  // 0x10..0x17: mask bits, 32 per word

endpackage
