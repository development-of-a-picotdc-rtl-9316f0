// ipbus_pkg: types and constants shared by the IPbus side of the PicoTDC
// board firmware.
//
// The on-chip IPbus is a single-master A32/D32 bus. The master drives the
// ipb_wbus_t bundle (address, write data, write flag, strobe); the addressed
// slave answers on ipb_rbus_t (read data, ack, err). A cycle starts when the
// strobe is raised and ends in the cycle where ack or err is high; a
// zero-wait slave may tie ack to its strobe.
//
// The transaction header layout (version, transaction ID, word count, type
// ID, info code) and the info codes follow the IPbus 2.0 protocol. The
// address map at the end is this design's own choice: slave number in
// address bits [11:8], register number in bits [7:0].
package ipbus_pkg;

  typedef struct packed {
    logic [31:0] addr;
    logic [31:0] wdata;
    logic        write;
    logic        strobe;
  } ipb_wbus_t;

  typedef struct packed {
    logic [31:0] rdata;
    logic        ack;
    logic        err;
  } ipb_rbus_t;

  localparam ipb_wbus_t IPB_WBUS_NULL = '{addr: '0, wdata: '0, write: 1'b0, strobe: 1'b0};
  localparam ipb_rbus_t IPB_RBUS_NULL = '{rdata: '0, ack: 1'b0, err: 1'b0};

  // Transaction header, bits 31..0.
  typedef struct packed {
    logic [3:0]  version;   // must be 2
    logic [11:0] trans_id;
    logic [7:0]  words;     // words to transfer, 0..255
    logic [3:0]  type_id;
    logic [3:0]  info;      // 0xF in a request
  } ipb_trans_hdr_t;

  localparam logic [3:0] IPB_VERSION = 4'h2;

  typedef enum logic [3:0] {
    TYPE_READ      = 4'h0,   // incrementing read
    TYPE_WRITE     = 4'h1,   // incrementing write
    TYPE_READ_NI   = 4'h2,   // non-incrementing read
    TYPE_WRITE_NI  = 4'h3    // non-incrementing write
  } ipb_type_e;

  typedef enum logic [3:0] {
    INFO_OK          = 4'h0,
    INFO_BAD_HEADER  = 4'h1,
    INFO_RD_BUS_ERR  = 4'h4,
    INFO_WR_BUS_ERR  = 4'h5,
    INFO_RD_TIMEOUT  = 4'h6,
    INFO_WR_TIMEOUT  = 4'h7,
    INFO_REQUEST     = 4'hF
  } ipb_info_e;

  // Address map: slave index in addr[11:8]; addresses above 0xFFF are unmapped.
  localparam int unsigned N_SLAVES     = 7;
  localparam int unsigned SLV_CTRL     = 0;  // control register (soft reset, nuke)
  localparam int unsigned SLV_I2C_TDC  = 1;  // I2C master for the two PicoTDCs
  localparam int unsigned SLV_I2C_LRA  = 2;  // I2C master for LIROC A
  localparam int unsigned SLV_I2C_LRB  = 3;  // I2C master for LIROC B
  localparam int unsigned SLV_ANALOG   = 4;  // LIROC analog probe setup
  localparam int unsigned SLV_TDC_A    = 5;  // PicoTDC A readout
  localparam int unsigned SLV_TDC_B    = 6;  // PicoTDC B readout

  // PicoTDC readout frames
  localparam logic [7:0]  TDC_IDLE_BYTE = 8'hD0;
  localparam logic [31:0] TDC_IDLE_WORD = 32'hD0D0_D0D0;

endpackage
