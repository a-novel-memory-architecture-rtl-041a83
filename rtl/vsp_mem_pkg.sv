// Shared constants, types and helper functions of the two-level video
// signal processor memory.
//
// The memory has four groups (one per function unit). Each group owns one
// 32-bit bus, four 8-bit bank-A memories and a column of stacked bank B's.
// A bank B holds a 4x4 array of 16-byte sub-banks: rows take the bytes that
// are written, columns are the read ports. The word widths (8-bit read
// ports, 16-bit write ports, 32-bit buses) and the SEL2 column table are
// the published ones; the encodings of the enums and of the write-control
// struct are this design's own.
package vsp_mem_pkg;

  localparam int N_GROUPS = 4;   // function units, buses, bank-A groups
  localparam int GW       = 2;   // bits of a group / bus / FU index
  localparam int BYTE_W   = 8;   // pixel and read-port width
  localparam int HALF_W   = 16;  // write-port width
  localparam int BUS_W    = 32;  // inter-level bus width
  localparam int N_ROWS   = 4;   // data rows of a bank B (data1..data4)
  localparam int N_COLS   = 4;   // read columns of a bank B
  localparam int SUB_AW   = 4;   // one 4-bit write decoder per bank B

  // How the concatenating switches cut the buses: one group of sixteen
  // read columns, two groups of eight, or four groups of four.
  typedef enum logic [1:0] {
    PART_1 = 2'd0,
    PART_2 = 2'd1,
    PART_4 = 2'd2
  } part_e;

  // Where a bank B takes its 16-bit write data from.
  typedef enum logic {
    SRC_BUS = 1'b0,   // a 16-bit half of one of the 32-bit buses
    SRC_FU  = 1'b1    // the 16-bit result of one of the function units
  } bsrc_e;

  // Write control of one bank B for one clock.
  typedef struct packed {
    logic                  we;     // write this clock
    logic [SUB_AW-1:0]     waddr;  // word inside every 16-byte sub-bank
    logic [N_ROWS-1:0]     sel1;   // SEL1: rows written (bit 0 = data1)
    logic [1:0][1:0]       sel2;   // SEL2: [0] for rows 1-2, [1] for rows 3-4
    bsrc_e                 src;    // bus or function unit
    logic [GW-1:0]         idx;    // which bus or which function unit
    logic                  half;   // bus half: 0 = bits 15:0, 1 = bits 31:16
  } bwr_t;

  // SEL2 decoding: the columns of a bank B that take a write.
  // Bit 0 is column 1.
  function automatic logic [N_COLS-1:0] sel2_cols(input logic [1:0] s);
    unique case (s)
      2'b00:   return 4'b1111;
      2'b01:   return 4'b0011;
      2'b10:   return 4'b0101;
      default: return 4'b0001;
    endcase
  endfunction

  // True when groups a and b sit on the same joined bus segment.
  function automatic logic same_part(input part_e p, input logic [GW-1:0] a,
                                     input logic [GW-1:0] b);
    unique case (p)
      PART_1:  return 1'b1;
      PART_2:  return a[1] == b[1];
      default: return a == b;
    endcase
  endfunction

endpackage
