// axi4_pkg: AXI4 channel payloads and the register map of the accelerators'
// Byte-RAM.
//
// The accelerators are AXI4 slaves with a 32-bit data bus and 4-bit IDs by
// default. Each channel is a valid/ready pair plus one of the packed payload
// structs below. The register map (byte offsets inside an IP's window) is a
// design choice:
//   0x00        CTRL    write 1 to bit 0 to start an operation (reads 0)
//   0x04        STATUS  bit 0 busy, bit 1 done (set when results are stored,
//                       cleared by the next start)
//   0x40 + 4*i  operand A, element i
//   0x80 + 4*i  operand B, element i
//   0xC0 + 4*i  result C, element i (read-only)
package axi4_pkg;

  localparam int unsigned AXI_ID_W   = 4;
  localparam int unsigned AXI_ADDR_W = 32;
  localparam int unsigned AXI_DATA_W = 32;

  typedef enum logic [1:0] {BURST_FIXED = 2'b00, BURST_INCR = 2'b01, BURST_WRAP = 2'b10} burst_e;
  typedef enum logic [1:0] {RESP_OKAY = 2'b00, RESP_EXOKAY = 2'b01, RESP_SLVERR = 2'b10, RESP_DECERR = 2'b11} resp_e;

  typedef struct packed {
    logic [AXI_ID_W-1:0]   id;
    logic [AXI_ADDR_W-1:0] addr;
    logic [7:0]            len;     // beats - 1
    logic [2:0]            size;    // log2(bytes per beat)
    burst_e                burst;
  } axi_ax_t;

  typedef struct packed {
    logic [AXI_DATA_W-1:0]   data;
    logic [AXI_DATA_W/8-1:0] strb;
    logic                    last;
  } axi_w_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0] id;
    resp_e               resp;
  } axi_b_t;

  typedef struct packed {
    logic [AXI_ID_W-1:0]   id;
    logic [AXI_DATA_W-1:0] data;
    resp_e                 resp;
    logic                  last;
  } axi_r_t;

  localparam logic [7:0] REG_CTRL   = 8'h00;
  localparam logic [7:0] REG_STATUS = 8'h04;
  localparam logic [7:0] BASE_OPA   = 8'h40;
  localparam logic [7:0] BASE_OPB   = 8'h80;
  localparam logic [7:0] BASE_RES   = 8'hC0;

endpackage
