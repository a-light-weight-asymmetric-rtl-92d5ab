// pl_sync_writer: the PL's side of the shared-memory synchronisation.
//
// The document's PS cores schedule their threads by watching words in the shared
// on-chip memory: the state flag and the DMA interrupt counter. This block keeps
// those words up to date from the PL. On NEXT_FRAME it clears its interrupt
// counter, rewrites the counter word and then writes the 'N' flag to the flag
// word (counter first, so a core that sees 'N' never sees last frame's count). On
// every DMA interrupt it increments the counter and writes the new value to the
// counter word. Writes go through one shared-memory port; a request is held
// until granted and the counter word is written with its value at the time of
// the grant, with a further write queued if an interrupt arrived meanwhile.
// Who writes the counter is not stated in the document (it says only that the PS
// monitors the interrupt counter in the SRAM); writing it from the PL is this
// design's choice.
//
// Lint notes: this port only writes, so it uses gnt from the response and
// ignores rvalid and rdata; its request never sets tas, always sets we, and
// addresses only words 0 and 1, so those request bits are constant.
// rst_n is reported as both an asynchronous reset and a synchronous input only
// because the assertion uses it in its disable condition.
module pl_sync_writer
  import lidar_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        next_frame,
  input  logic        dma_irq,
  output ocm_req_t    ocm_req,
  input  ocm_rsp_t    ocm_rsp,
  output logic [31:0] irq_count
);

  logic pend_cnt, pend_flag;
  logic sel_cnt;  // the request now on the port writes the counter

  assign sel_cnt = pend_cnt;   // counter before flag

  always_comb begin
    ocm_req       = '0;
    ocm_req.req   = pend_cnt || pend_flag;
    ocm_req.we    = 1'b1;
    ocm_req.addr  = sel_cnt ? OCM_IRQ_CNT_ADDR : OCM_FLAG_ADDR;
    ocm_req.wdata = sel_cnt ? irq_count : 32'(FLAG_NEXT_FRAME);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      irq_count <= '0;
      pend_cnt  <= 1'b0;
      pend_flag <= 1'b0;
    end else begin
      if (ocm_rsp.gnt) begin
        if (sel_cnt) pend_cnt  <= 1'b0;
        else         pend_flag <= 1'b0;
      end
      if (next_frame) begin
        irq_count <= '0;
        pend_cnt  <= 1'b1;
        pend_flag <= 1'b1;
      end else if (dma_irq) begin
        irq_count <= irq_count + 1'b1;
        pend_cnt  <= 1'b1;
      end
    end
  end

  a_grant_only_on_req: assert property (@(posedge clk) disable iff (!rst_n)
    ocm_rsp.gnt |-> ocm_req.req);

endmodule
