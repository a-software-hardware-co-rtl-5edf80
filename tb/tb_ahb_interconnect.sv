// tb_ahb_interconnect -- self-checking test of the bus arbiter and decoder.
//
// Two master models (CPU and host bridge) run random single transfers at the
// same time into five memory slave models that sit at the five slave
// addresses (two of them insert wait states).  Each master owns its own
// words, so every read has a known expected value.  Checked: read data,
// that exactly one master holds the grant in every cycle, that the grant
// changes hands (both masters are served), that each slave is reached
// through its own select, and that accesses to an unmapped address get the
// two-cycle ERROR response while mapped ones never do.
module tb_ahb_interconnect;
  import avc_pkg::*;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  logic     mreq [2];
  logic     mgnt [2];
  ahb_m2s_t mst_m [2];
  ahb_s2m_t mst_s;
  logic     hsel [NSLV];
  ahb_m2s_t slv_m;
  ahb_s2m_t slv_s [NSLV];
  logic     hready;

  int checks = 0, failures = 0;
  int handovers = 0;

  ahb_interconnect #(.NMST(2)) dut (.*);

  ahb_master_bfm cpu  (.clk, .gnt(mgnt[0]), .s(mst_s), .req(mreq[0]), .m(mst_m[0]));
  ahb_master_bfm host (.clk, .gnt(mgnt[1]), .s(mst_s), .req(mreq[1]), .m(mst_m[1]));

  ahb_mem_model #(.WORDS(256), .WAIT(0)) u_s0 (.clk, .rst_n, .hsel(hsel[0]), .m(slv_m), .hready, .s(slv_s[0]));
  ahb_mem_model #(.WORDS(256), .WAIT(2)) u_s1 (.clk, .rst_n, .hsel(hsel[1]), .m(slv_m), .hready, .s(slv_s[1]));
  ahb_mem_model #(.WORDS(256), .WAIT(0)) u_s2 (.clk, .rst_n, .hsel(hsel[2]), .m(slv_m), .hready, .s(slv_s[2]));
  ahb_mem_model #(.WORDS(256), .WAIT(1)) u_s3 (.clk, .rst_n, .hsel(hsel[3]), .m(slv_m), .hready, .s(slv_s[3]));
  ahb_mem_model #(.WORDS(256), .WAIT(0)) u_s4 (.clk, .rst_n, .hsel(hsel[4]), .m(slv_m), .hready, .s(slv_s[4]));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] base_of(input int k);
    case (k)
      0: return BASE_SRAM;
      1: return BASE_EMI;
      2: return BASE_MC;
      3: return BASE_IQ;
      default: return BASE_LF;
    endcase
  endfunction

  // grant checks
  logic gnt_q;
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (mgnt[0] == mgnt[1]) begin
      failures++;
      $display("grant not one-hot");
    end
    if (mgnt[1] != gnt_q) handovers++;
    gnt_q = mgnt[1];
  end
  initial gnt_q = 1'b0;

  logic [31:0] shadow [2][5][64];

  task automatic traffic(input int mi, input int n);
    for (int t = 0; t < n; t++) begin
      int k, w;
      logic [31:0] a, d, r;
      k = $urandom_range(0, 4);
      w = 2 * $urandom_range(0, 63) + mi;       // master mi owns words w%2 == mi
      a = base_of(k) + 32'(4 * w);
      if ($urandom_range(0, 1)) begin
        d = $urandom;
        if (mi == 0) cpu.write(a, d); else host.write(a, d);
        shadow[mi][k][w / 2] = d;
      end else begin
        if (mi == 0) cpu.read(a, r); else host.read(a, r);
        checks++;
        if (r !== shadow[mi][k][w / 2]) begin
          failures++;
          if (failures < 10)
            $display("master %0d read %08h: got %08h expected %08h", mi, a, r, shadow[mi][k][w / 2]);
        end
      end
      // give the bus away now and then
      if ($urandom_range(0, 3) == 0) begin
        if (mi == 0) cpu.want_bus = 1'b0; else host.want_bus = 1'b0;
        repeat ($urandom_range(1, 4)) @(posedge clk);
        if (mi == 0) cpu.want_bus = 1'b1; else host.want_bus = 1'b1;
      end
    end
    // done: stop requesting, so the other master is not locked out
    if (mi == 0) cpu.want_bus = 1'b0; else host.want_bus = 1'b0;
  endtask

  initial begin
    logic [31:0] d;
    int e0;
    for (int i = 0; i < 2; i++) for (int k = 0; k < 5; k++) for (int w = 0; w < 64; w++)
      shadow[i][k][w] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    fork
      traffic(0, 600);
      traffic(1, 600);
    join
    checks++;
    if (cpu.errors != 0 || host.errors != 0) begin
      failures++;
      $display("ERROR response on a mapped address");
    end
    // unmapped addresses: two-cycle ERROR
    cpu.want_bus = 1'b1;
    for (int i = 0; i < 4; i++) begin
      int t0;
      e0 = cpu.errors;
      t0 = 0;
      fork
        cpu.write(32'h4000_0000 + 32'(i * 32'h1000_0000 / 2), 32'h1234);
        begin
          @(posedge clk);
          while (hready) @(posedge clk);
          t0 = 1;
          @(negedge clk);
          checks++;
          if (!(mst_s.hresp && hready)) failures++;
        end
      join
      checks++;
      if (cpu.errors != e0 + 1 || t0 != 1) begin
        failures++;
        $display("no ERROR response for an unmapped address");
      end
    end
    $display("slave accesses %0d %0d %0d %0d %0d, grant handovers %0d, wait cycles %0d",
             u_s0.accesses, u_s1.accesses, u_s2.accesses, u_s3.accesses, u_s4.accesses,
             handovers, u_s1.wait_cycles + u_s3.wait_cycles);
    checks += 3;
    if (u_s0.accesses == 0 || u_s1.accesses == 0 || u_s2.accesses == 0 ||
        u_s3.accesses == 0 || u_s4.accesses == 0) failures++;
    if (handovers < 10) failures++;
    if (u_s1.wait_cycles == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
