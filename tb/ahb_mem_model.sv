// ahb_mem_model -- behavioural AHB-Lite memory slave for the testbenches
// (stands in for the embedded SRAM or the memory behind the external memory
// interface).
//
// A word-addressed memory of WORDS 32-bit words (the address is taken modulo
// the size).  The address phase is registered when the slave is selected
// with HREADY high; the data phase then lasts WAIT + 1 cycles (HREADYOUT low
// for WAIT cycles).  Writes honour HSIZE byte lanes; reads return the word.
// `accesses` and `wait_cycles` count what happened.
module ahb_mem_model
  import avc_pkg::*;
#(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned WAIT  = 0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     hsel,
  input  ahb_m2s_t m,
  input  logic     hready,
  output ahb_s2m_t s
);
  logic [31:0] mem [WORDS];
  logic        dp, dp_wr;
  logic [31:0] dp_addr;
  logic [2:0]  dp_size;
  int unsigned wcnt;
  int          accesses    = 0;
  int          wait_cycles = 0;

  initial for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;

  function automatic int unsigned widx(input logic [31:0] a);
    return (a >> 2) % WORDS;
  endfunction

  always_comb begin
    s.hresp  = 1'b0;
    s.hready = !(dp && wcnt < WAIT);
    s.hrdata = (dp && !dp_wr) ? mem[widx(dp_addr)] : 32'h0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp      <= 1'b0;
      dp_wr   <= 1'b0;
      dp_addr <= '0;
      dp_size <= '0;
      wcnt    <= 0;
    end else begin
      if (dp && wcnt < WAIT) begin
        wcnt <= wcnt + 1;
        wait_cycles++;
      end
      if (dp && s.hready && dp_wr) begin
        for (int b = 0; b < 4; b++)
          if (dp_size == 3'd2 || (dp_size == 3'd1 && dp_addr[1] == b[1]) ||
              (dp_size == 3'd0 && dp_addr[1:0] == 2'(b)))
            mem[widx(dp_addr)][8*b +: 8] <= m.hwdata[8*b +: 8];
      end
      if (hready) begin
        dp      <= hsel && m.htrans[1];
        dp_wr   <= m.hwrite;
        dp_addr <= m.haddr;
        dp_size <= m.hsize;
        wcnt    <= 0;
        if (hsel && m.htrans[1]) accesses++;
      end
    end
  end
endmodule
