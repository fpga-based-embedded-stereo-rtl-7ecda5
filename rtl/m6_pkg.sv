// m6_pkg: widths and stream types shared by the FPGA image processing system.
//
// The system is built from small units joined by request/acknowledge
// streams: a word moves on every rising clock edge at which the source's
// request and the sink's acknowledge are both high. The types below are the
// payloads carried on those streams and on the SRAM request buses.
//
// The 18-bit SRAM word, the 20-bit CPU address split into 32 device IDs and
// the 8-bit camera pixel follow the described platform. The 19-bit SRAM
// address (512K x 18, about 1 MB) and the 16-bit CPU data bus are this
// design's reading of the "1MB SRAM" and the PXA255 VLIO bus.
package m6_pkg;

  localparam int PIX_W      = 8;   // camera luminance pixel
  localparam int SRAM_DW    = 18;  // external SRAM / Block RAM word
  localparam int SRAM_AW    = 19;  // 512K words of 18 bits
  localparam int CPU_AW     = 20;  // CPU address lines into the FPGA
  localparam int CPU_DW     = 16;  // CPU data bus
  localparam int DEV_ID_W   = 5;   // 32 device IDs
  localparam int DEV_OFF_W  = CPU_AW - DEV_ID_W; // 15-bit word offset per device
  localparam int NUM_DEV    = 1 << DEV_ID_W;

  // Single pixel stream word, sof marks the first pixel of a frame.
  typedef struct packed {
    logic             sof;
    logic [PIX_W-1:0] pix;
  } pix_t;

  // Stereo pixel pair at the same image position.
  typedef struct packed {
    logic             sof;
    logic [PIX_W-1:0] left;
    logic [PIX_W-1:0] right;
  } pair_t;

  // SRAM write request.
  typedef struct packed {
    logic [SRAM_AW-1:0] addr;
    logic [SRAM_DW-1:0] data;
  } sram_wr_t;

  // Access direction of the interleave logic.
  typedef enum logic {DIR_READ = 1'b0, DIR_WRITE = 1'b1} sram_dir_e;

endpackage
