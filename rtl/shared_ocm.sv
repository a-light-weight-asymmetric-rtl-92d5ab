// shared_ocm: on-chip memory shared by the PL and the two PS cores.
//
// The document uses the SoC's 256 KB on-chip memory as the shared memory of its
// asymmetric multi-processing scheme: it holds the state flag of the LiDAR state
// machine, the DMA interrupt counter and global variables such as a mutex, and is
// reached by the PL over the PL-to-memory interconnect and by the PS cores over
// AXI. Here it is one single-ported RAM of WORDS 32-bit words behind a
// round-robin arbiter with NPORTS request ports (port 0: PL, ports 1 and 2: PS
// cores #1 and #2). One access is granted per clock. A port holds req until gnt;
// a read returns rdata with rvalid on the next clock. An atomic test-and-set
// (tas) returns the old word and writes wdata in the same access, so a mutex
// cannot be taken by two cores at once; the document names a mutex but not how
// it is made atomic, so this operation is this design's own.
// Every granted write to the state-flag word is also shown for one clock on
// flag_wr_valid / flag_wr_data, which is how the PL state machine follows the
// flags the PS writes.
//
// Lint notes: the round-robin loop index is an int of which only the low bits
// are used, and the granted request's req bit is not needed after arbitration.
module shared_ocm
  import lidar_pkg::*;
#(
  parameter int unsigned NPORTS = 3,
  parameter int unsigned WORDS  = 65536   // 256 KB
) (
  input  logic        clk,
  input  logic        rst_n,
  input  ocm_req_t    req [NPORTS],
  output ocm_rsp_t    rsp [NPORTS],
  output logic        flag_wr_valid,
  output state_flag_e flag_wr_data
);

  localparam int unsigned AW = $clog2(WORDS);
  localparam int unsigned PW = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  logic [31:0] mem [WORDS];

  // ------------------------------------------------ round-robin arbiter
  logic [PW-1:0] last;     // last port granted
  logic [PW-1:0] sel;
  logic          any;

  always_comb begin
    any = 1'b0;
    sel = '0;
    for (int k = 1; k <= NPORTS; k++) begin
      int p;
      p = (int'(last) + k) % NPORTS;
      if (!any && req[p].req) begin
        any = 1'b1;
        sel = PW'(p);
      end
    end
  end

  ocm_req_t      g;          // granted request
  logic [AW-1:0] gaddr;
  assign g     = req[sel];
  assign gaddr = AW'(g.addr);

  logic [31:0]   rd_q;
  logic [PW-1:0] rd_port;
  logic          rd_v;

  always_ff @(posedge clk) begin
    if (any) begin
      if (g.we || g.tas) mem[gaddr] <= g.wdata;
      rd_q <= mem[gaddr];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last          <= PW'(NPORTS - 1);
      rd_v          <= 1'b0;
      rd_port       <= '0;
      flag_wr_valid <= 1'b0;
      flag_wr_data  <= FLAG_NONE;
    end else begin
      rd_v          <= any && (!g.we || g.tas);
      flag_wr_valid <= 1'b0;
      if (any) begin
        last    <= sel;
        rd_port <= sel;
        if ((g.we || g.tas) && g.addr == OCM_FLAG_ADDR) begin
          flag_wr_valid <= 1'b1;
          flag_wr_data  <= state_flag_e'(g.wdata[7:0]);
        end
      end
    end
  end

  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      rsp[p].gnt    = any && (sel == PW'(p));
      rsp[p].rvalid = rd_v && (rd_port == PW'(p));
      rsp[p].rdata  = rd_q;
    end
  end

endmodule
