// ar_pkg: types and constants shared by the automated-receptionist system.
//
// The system is a processor-centred design: a soft processor reaches its
// peripherals through a 32-bit Avalon-MM style data bus. Every bus slave in
// this design takes an avm_req_t and answers with an avm_rsp_t:
//   * address is a byte address, read/write are one-cycle strobes that are
//     held while waitrequest is high (the access is taken in the cycle where
//     read|write is high and waitrequest is low);
//   * read data comes back with readdatavalid, one or more cycles later.
// The base and end addresses of latch_pio, sensor_pio and led_pio are the
// ones of the processor system this design follows; the addresses of the
// other slaves were not given there and are this design's choice, placed in
// free space of the same map.
package ar_pkg;

  localparam int unsigned AV_AW = 25;   // 0x0000000 .. 0x1ffffff
  localparam int unsigned AV_DW = 32;

  typedef struct packed {
    logic [AV_AW-1:0] address;
    logic             read;
    logic             write;
    logic [AV_DW-1:0] writedata;
    logic [3:0]       byteenable;
  } avm_req_t;

  typedef struct packed {
    logic [AV_DW-1:0] readdata;
    logic             waitrequest;
    logic             readdatavalid;
  } avm_rsp_t;

  localparam avm_req_t AVM_REQ_IDLE = '{default: '0};
  localparam avm_rsp_t AVM_RSP_IDLE = '{default: '0};

  // Slaves reachable through the decoder.
  typedef enum logic [3:0] {
    SL_LATCH   = 4'd0,
    SL_SENSOR  = 4'd1,
    SL_LED     = 4'd2,
    SL_RED_LED = 4'd3,
    SL_SD_DAT  = 4'd4,
    SL_SD_CMD  = 4'd5,
    SL_SD_CLK  = 4'd6,
    SL_AUDIO   = 4'd7,
    SL_VIDEO   = 4'd8,
    SL_SRAM    = 4'd9,
    SL_SD_DAT3 = 4'd10,
    SL_NONE    = 4'd15
  } slave_e;
  localparam int unsigned NUM_SLAVES = 11;

  typedef struct packed {
    logic [AV_AW-1:0] base;
    logic [AV_AW-1:0] last;   // inclusive end address
  } addr_range_t;

  // Address map. Printed in the source system: latch, sensor, led.
  localparam addr_range_t MAP_LATCH   = '{25'h1109040, 25'h110905f};
  localparam addr_range_t MAP_SENSOR  = '{25'h1109080, 25'h110908f};
  localparam addr_range_t MAP_LED     = '{25'h1109070, 25'h110907f};
  // Chosen here (free space of the same map).
  localparam addr_range_t MAP_RED_LED = '{25'h11090a0, 25'h11090bf};
  localparam addr_range_t MAP_SD_DAT  = '{25'h11090c0, 25'h11090cf};
  localparam addr_range_t MAP_SD_CMD  = '{25'h11090d0, 25'h11090df};
  localparam addr_range_t MAP_SD_CLK  = '{25'h11090e0, 25'h11090ef};
  localparam addr_range_t MAP_AUDIO   = '{25'h1109100, 25'h110910f};
  localparam addr_range_t MAP_VIDEO   = '{25'h1109110, 25'h110911f};
  localparam addr_range_t MAP_SD_DAT3 = '{25'h1109120, 25'h110912f};
  localparam addr_range_t MAP_SRAM    = '{25'h1000000, 25'h10fffff};

  // Pixel formats of the video-in path.
  typedef struct packed {
    logic [7:0] y;
    logic [7:0] c;    // Cb on even pixels of a line, Cr on odd ones
  } ycc422_t;

  typedef struct packed {
    logic [7:0] y;
    logic [7:0] cb;
    logic [7:0] cr;
  } ycc444_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb888_t;

  typedef struct packed {
    logic [4:0] r;
    logic [5:0] g;
    logic [4:0] b;
  } rgb565_t;

  function automatic rgb565_t to_rgb565(rgb888_t p);
    return '{r: p.r[7:3], g: p.g[7:2], b: p.b[7:3]};
  endfunction

  // 16-bit word port of the SRAM controller.
  typedef struct packed {
    logic [17:0] address;   // word address
    logic        read;
    logic        write;
    logic [15:0] writedata;
    logic [1:0]  byteenable;
  } sram_req_t;

  typedef struct packed {
    logic [15:0] readdata;
    logic        waitrequest;
    logic        readdatavalid;
  } sram_rsp_t;

endpackage
