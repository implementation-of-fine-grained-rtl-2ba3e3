// cmon_csr: software registers of one cache monitor.
//
// A simple request bus (one request per cycle, no wait states) reaches the
// registers listed in cmon_pkg. Writes take effect on the next clock edge;
// reads return csr_rdata with csr_rvalid one cycle after the request.
// The activity vector is read as 32-bit words: thread t occupies
// VEC_WORDS consecutive words starting at CSR_VEC_BASE + 4*t*VEC_WORDS, and
// super set s of that thread is bits [s*LVL_W +: LVL_W] of the thread's
// concatenated words. Unmapped addresses read as zero; writes to read-only
// registers are ignored. A write to CSR_INTERVAL pulses interval_wr so the
// timer restarts its count.
//
// From the original proposal: only the compact activity vector is handed to the
// operating system, not the counters. The register map, reset values
// (monitor disabled, one-million-cycle interval) and bus are this design's
// own choices.
module cmon_csr
  import cmon_pkg::*;
#(
  parameter int unsigned THREADS      = 2,
  parameter int unsigned N_SS         = 32,
  parameter int unsigned CNT_W        = 20,
  parameter int unsigned LEVELS       = 4,
  parameter int unsigned DEF_CUTOFF   = 1024,
  parameter int unsigned DEF_INTERVAL = 1_000_000,
  localparam int unsigned LVL_W       = idx_w(LEVELS),
  localparam int unsigned VEC_WORDS   = (N_SS*LVL_W + CSR_DW - 1) / CSR_DW
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // register bus
  input  logic                               csr_req,
  input  logic                               csr_we,
  input  logic [CSR_AW-1:0]                  csr_addr,
  input  logic [CSR_DW-1:0]                  csr_wdata,
  output logic [CSR_DW-1:0]                  csr_rdata,
  output logic                               csr_rvalid,
  // configuration out
  output ctrl_t                              cfg_ctrl,
  output logic [CNT_W-1:0]                   cfg_cutoff,
  output logic [31:0]                        cfg_interval,
  output logic                               interval_wr,
  // status in
  input  logic [31:0]                        sample_count,
  input  logic [THREADS*N_SS-1:0][LVL_W-1:0] vec,
  input  logic                               vec_valid
);

  localparam int unsigned NWORDS = THREADS * VEC_WORDS;

  logic [NWORDS-1:0][CSR_DW-1:0] vwords;
  for (genvar t = 0; t < THREADS; t++) begin : g_pack
    assign vwords[t*VEC_WORDS +: VEC_WORDS] = (VEC_WORDS*CSR_DW)'(vec[t*N_SS +: N_SS]);
  end

  logic wr;
  assign wr = csr_req && csr_we;
  assign interval_wr = wr && (csr_addr == CSR_INTERVAL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_ctrl     <= '0;
      cfg_cutoff   <= CNT_W'(DEF_CUTOFF);
      cfg_interval <= 32'(DEF_INTERVAL);
    end else if (wr) begin
      unique case (csr_addr)
        CSR_CTRL:     cfg_ctrl     <= ctrl_t'({30'b0, csr_wdata[1:0]});
        CSR_CUTOFF:   cfg_cutoff   <= csr_wdata[CNT_W-1:0];
        CSR_INTERVAL: cfg_interval <= csr_wdata;
        default: ;
      endcase
    end
  end

  // read data
  logic [CSR_DW-1:0] rdata_d;
  logic [CSR_AW-3:0] vidx;  // word index inside the vector area
  assign vidx = csr_addr[CSR_AW-1:2] - CSR_VEC_BASE[CSR_AW-1:2];

  always_comb begin
    rdata_d = '0;
    if (csr_addr >= CSR_VEC_BASE) begin
      if (32'(vidx) < NWORDS) rdata_d = vwords[vidx];
    end else begin
      unique case (csr_addr)
        CSR_CTRL:     rdata_d = cfg_ctrl;
        CSR_CUTOFF:   rdata_d = 32'(cfg_cutoff);
        CSR_INTERVAL: rdata_d = cfg_interval;
        CSR_SAMPLES:  rdata_d = sample_count;
        CSR_CONFIG:   rdata_d = {8'(THREADS), 8'(LEVELS), 16'(N_SS)};
        CSR_STATUS:   rdata_d = {31'b0, vec_valid};
        default:      rdata_d = '0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      csr_rvalid <= 1'b0;
      csr_rdata  <= '0;
    end else begin
      csr_rvalid <= csr_req && !csr_we;
      if (csr_req && !csr_we) csr_rdata <= rdata_d;
    end
  end

  localparam bit VEC_FITS = (32'(CSR_VEC_BASE) + 4*NWORDS) <= (1 << CSR_AW);
  initial assert (VEC_FITS) else $error("activity vector does not fit the register window");

endmodule
