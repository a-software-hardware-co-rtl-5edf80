// avc_pkg -- types, constants and small tables shared by the decoder's
// hardware coprocessors.
//
// The coprocessors sit on a 32-bit AHB system bus as slaves and are driven
// macroblock (MB) by macroblock by the host CPU.  This package holds:
//   * the AHB bundles (master-to-slave and slave-to-master), used as structs
//     on every bus port so that the same signal set is not repeated;
//   * the address map of the bus slaves;
//   * the H.264 tables the datapaths need: the dequantisation scale v(QP%6,
//     position class), and the deblocking thresholds alpha, beta and tC0.
// The 32-bit bus width follows the design; the address map, the register
// layouts and the struct encodings are this design's own choices.  The tables
// are the ones the H.264 standard defines (with flat scaling matrices).
package avc_pkg;

  // ---------------------------------------------------------------- AHB
  localparam int unsigned AHB_AW = 32;
  localparam int unsigned AHB_DW = 32;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  // Master to slave: address-phase signals plus the data-phase write data.
  typedef struct packed {
    logic [AHB_AW-1:0] haddr;
    htrans_e           htrans;
    logic              hwrite;
    logic [2:0]        hsize;
    logic [AHB_DW-1:0] hwdata;
  } ahb_m2s_t;

  // Slave to master.
  typedef struct packed {
    logic [AHB_DW-1:0] hrdata;
    logic              hready;   // HREADYOUT of a slave / HREADY to a master
    logic              hresp;    // 0 OKAY, 1 ERROR
  } ahb_s2m_t;

  // Simple word-addressed register bus produced by ahb_slave_port.
  typedef struct packed {
    logic        we;
    logic [11:0] waddr;   // word address inside the slave's 16 KiB window
    logic [31:0] wdata;
    logic [3:0]  wstrb;
    logic [11:0] raddr;   // word address of the read in its data phase
  } regbus_t;

  // ---------------------------------------------------------- address map
  // Slave index: 0 embedded SRAM, 1 external memory interface, 2 MC,
  // 3 Q^-1DCT^-1, 4 loop filter.  Each coprocessor owns a 64 KiB window.
  localparam int unsigned NSLV       = 5;
  localparam int unsigned SLV_SRAM   = 0;
  localparam int unsigned SLV_EMI    = 1;
  localparam int unsigned SLV_MC     = 2;
  localparam int unsigned SLV_IQ     = 3;
  localparam int unsigned SLV_LF     = 4;
  localparam logic [31:0] BASE_SRAM  = 32'h0000_0000;  // 1 MiB
  localparam logic [31:0] BASE_EMI   = 32'h2000_0000;  // 256 MiB
  localparam logic [31:0] BASE_MC    = 32'h8000_0000;
  localparam logic [31:0] BASE_IQ    = 32'h8001_0000;
  localparam logic [31:0] BASE_LF    = 32'h8002_0000;

  // -------------------------------------------- coprocessor register words
  // Common control/status words of every coprocessor (byte offsets).
  // CTRL: write bit 0 = 1 starts one MB task (further bits per coprocessor).
  // STATUS: bit 0 ready (last task finished), bit 1 busy.
  // CYCLES: clock cycles the last task took.
  localparam logic [11:0] MC_CTRL_W   = 12'h1C0;  // byte 0x700
  localparam logic [11:0] MC_STAT_W   = 12'h1C1;  // byte 0x704
  localparam logic [11:0] MC_CYC_W    = 12'h1C2;  // byte 0x708
  localparam logic [11:0] MC_MV_W     = 12'h180;  // byte 0x600..0x63C
  localparam logic [11:0] IQ_RES_W    = 12'h080;  // byte 0x200..0x4FC
  localparam logic [11:0] IQ_CTRL_W   = 12'h180;  // byte 0x600
  localparam logic [11:0] IQ_STAT_W   = 12'h181;  // byte 0x604
  localparam logic [11:0] IQ_INFO_W   = 12'h182;  // byte 0x608
  localparam logic [11:0] IQ_QP_W     = 12'h183;  // byte 0x60C
  localparam logic [11:0] IQ_CYC_W    = 12'h184;  // byte 0x610
  localparam logic [11:0] IQ_DCM_W    = 12'h185;  // byte 0x614
  localparam logic [11:0] LF_CTRL_W   = 12'h080;  // byte 0x200
  localparam logic [11:0] LF_STAT_W   = 12'h081;  // byte 0x204
  localparam logic [11:0] LF_CYC_W    = 12'h082;  // byte 0x208
  localparam logic [11:0] LF_BS_W     = 12'h084;  // byte 0x210..0x21C
  localparam logic [11:0] LF_QPY_W    = 12'h088;  // byte 0x220
  localparam logic [11:0] LF_QPC_W    = 12'h089;  // byte 0x224

  // ------------------------------------------------------------- helpers
  function automatic logic [7:0] clip_pix(input logic signed [23:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

  // Dequantisation scale v(m, class) of H.264 (flat scaling).
  // class 0: positions (even row, even col); 1: (odd, odd); 2: the rest.
  function automatic logic [4:0] dq_scale(input logic [2:0] m, input logic [1:0] cls);
    logic [4:0] t [6][3];
    t = '{'{5'd10, 5'd13, 5'd16}, '{5'd11, 5'd14, 5'd18}, '{5'd13, 5'd16, 5'd20},
          '{5'd14, 5'd18, 5'd23}, '{5'd16, 5'd20, 5'd25}, '{5'd18, 5'd23, 5'd29}};
    return t[m][cls];
  endfunction

  // Deblocking threshold alpha'(indexA).
  function automatic logic [7:0] lf_alpha(input logic [5:0] ia);
    logic [7:0] t [36];
    t = '{8'd4, 8'd4, 8'd5, 8'd6, 8'd7, 8'd8, 8'd9, 8'd10, 8'd12, 8'd13, 8'd15,
          8'd17, 8'd20, 8'd22, 8'd25, 8'd28, 8'd32, 8'd36, 8'd40, 8'd45, 8'd50,
          8'd56, 8'd63, 8'd71, 8'd80, 8'd90, 8'd101, 8'd113, 8'd127, 8'd144,
          8'd162, 8'd182, 8'd203, 8'd226, 8'd255, 8'd255};
    if (ia < 6'd16) return 8'd0;
    return t[ia - 6'd16];
  endfunction

  // Deblocking threshold beta'(indexB).
  function automatic logic [7:0] lf_beta(input logic [5:0] ib);
    logic [4:0] t [36];
    t = '{5'd2, 5'd2, 5'd2, 5'd3, 5'd3, 5'd3, 5'd3, 5'd4, 5'd4, 5'd4, 5'd6,
          5'd6, 5'd7, 5'd7, 5'd8, 5'd8, 5'd9, 5'd9, 5'd10, 5'd10, 5'd11, 5'd11,
          5'd12, 5'd12, 5'd13, 5'd13, 5'd14, 5'd14, 5'd15, 5'd15, 5'd16, 5'd16,
          5'd17, 5'd17, 5'd18, 5'd18};
    if (ib < 6'd16) return 8'd0;
    return {3'b000, t[ib - 6'd16]};
  endfunction

  // Clipping threshold tC0(indexA, bS) for bS = 1..3.
  function automatic logic [4:0] lf_tc0(input logic [5:0] ia, input logic [2:0] bs);
    logic [4:0] t [35][3];
    t = '{'{5'd0, 5'd0, 5'd1}, '{5'd0, 5'd0, 5'd1}, '{5'd0, 5'd0, 5'd1},
          '{5'd0, 5'd0, 5'd1}, '{5'd0, 5'd1, 5'd1}, '{5'd0, 5'd1, 5'd1},
          '{5'd1, 5'd1, 5'd1}, '{5'd1, 5'd1, 5'd1}, '{5'd1, 5'd1, 5'd1},
          '{5'd1, 5'd1, 5'd1}, '{5'd1, 5'd1, 5'd2}, '{5'd1, 5'd1, 5'd2},
          '{5'd1, 5'd1, 5'd2}, '{5'd1, 5'd1, 5'd2}, '{5'd1, 5'd2, 5'd3},
          '{5'd1, 5'd2, 5'd3}, '{5'd2, 5'd2, 5'd3}, '{5'd2, 5'd2, 5'd4},
          '{5'd2, 5'd3, 5'd4}, '{5'd2, 5'd3, 5'd4}, '{5'd3, 5'd3, 5'd5},
          '{5'd3, 5'd4, 5'd6}, '{5'd3, 5'd4, 5'd6}, '{5'd4, 5'd5, 5'd7},
          '{5'd4, 5'd5, 5'd8}, '{5'd4, 5'd6, 5'd9}, '{5'd5, 5'd7, 5'd10},
          '{5'd6, 5'd8, 5'd11}, '{5'd6, 5'd8, 5'd13}, '{5'd7, 5'd10, 5'd14},
          '{5'd8, 5'd11, 5'd16}, '{5'd9, 5'd12, 5'd18}, '{5'd10, 5'd13, 5'd20},
          '{5'd11, 5'd15, 5'd23}, '{5'd13, 5'd17, 5'd25}};
    if (ia < 6'd17 || bs == 3'd0 || bs > 3'd3) return 5'd0;
    return t[ia - 6'd17][bs - 3'd1];
  endfunction

endpackage
