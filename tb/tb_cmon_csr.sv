// tb_cmon_csr: self-checking test of the monitor's software registers.
//
// Checks reset values, write/read-back of control, cutoff and interval, the
// interval write pulse, read-only registers (sample count, configuration,
// status), the one-cycle read latency, zero for unmapped addresses, and the
// packing of a random activity vector into 32-bit words (thread t, super set
// s at bit 2*s of the thread's two words), with the default sizes.
module tb_cmon_csr;
  import cmon_pkg::*;
  localparam int unsigned T = 2, N = 32, W = 20, L = 4;
  logic clk = 0, rst_n = 0;
  logic csr_req, csr_we, csr_rvalid, interval_wr, vec_valid;
  logic [CSR_AW-1:0] csr_addr;
  logic [31:0] csr_wdata, csr_rdata, cfg_interval, sample_count;
  ctrl_t cfg_ctrl;
  logic [W-1:0] cfg_cutoff;
  logic [T*N-1:0][1:0] vec;
  int checks = 0, failures = 0;

  cmon_csr dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  task automatic wr(logic [CSR_AW-1:0] a, logic [31:0] d);
    csr_req = 1; csr_we = 1; csr_addr = a; csr_wdata = d;
    #1;
    expect_eq("interval_wr pulse", interval_wr, a == CSR_INTERVAL);
    @(negedge clk);
    csr_req = 0; csr_we = 0;
  endtask

  task automatic rd(logic [CSR_AW-1:0] a, output logic [31:0] d);
    csr_req = 1; csr_we = 0; csr_addr = a;
    @(negedge clk);
    csr_req = 0;
    expect_eq("rvalid", csr_rvalid, 1);
    d = csr_rdata;
    @(negedge clk);
    expect_eq("rvalid drop", csr_rvalid, 0);
  endtask

  initial begin
    logic [31:0] d;
    logic [63:0] tw;
    csr_req = 0; csr_we = 0; csr_addr = 0; csr_wdata = 0;
    sample_count = 32'h1234_5678; vec_valid = 0; vec = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_eq("reset ctrl", cfg_ctrl, 0);
    expect_eq("reset cutoff", cfg_cutoff, 1024);
    expect_eq("reset interval", cfg_interval, 1_000_000);
    wr(CSR_CTRL, 32'hFFFF_FFFF);
    expect_eq("ctrl out", cfg_ctrl, 3);
    rd(CSR_CTRL, d);        expect_eq("ctrl rd", d, 3);
    wr(CSR_CUTOFF, 32'h00ABCDE);
    expect_eq("cutoff out", cfg_cutoff, 20'hABCDE);
    rd(CSR_CUTOFF, d);      expect_eq("cutoff rd", d, 20'hABCDE);
    wr(CSR_INTERVAL, 32'd5000);
    expect_eq("interval out", cfg_interval, 5000);
    rd(CSR_INTERVAL, d);    expect_eq("interval rd", d, 5000);
    wr(CSR_SAMPLES, 32'd0);
    rd(CSR_SAMPLES, d);     expect_eq("samples rd", d, 32'h1234_5678);
    rd(CSR_CONFIG, d);      expect_eq("config rd", d, {8'd2, 8'd4, 16'd32});
    rd(CSR_STATUS, d);      expect_eq("status rd", d, 0);
    vec_valid = 1;
    rd(CSR_STATUS, d);      expect_eq("status rd valid", d, 1);
    rd(10'h3F0, d);         expect_eq("unmapped rd", d, 0);
    rd(CSR_VEC_BASE + 16, d); expect_eq("beyond vector rd", d, 0);
    for (int r = 0; r < 20; r++) begin
      for (int i = 0; i < T*N; i++) vec[i] = 2'($urandom);
      for (int t = 0; t < T; t++) begin
        for (int s = 0; s < N; s++) tw[2*s +: 2] = vec[t*N + s];
        for (int w = 0; w < 2; w++) begin
          rd(CSR_VEC_BASE + CSR_AW'(4 * (2 * t + w)), d);
          expect_eq($sformatf("vector t%0d w%0d", t, w), d, tw[32*w +: 32]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
