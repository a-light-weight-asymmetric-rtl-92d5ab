// tb_ahb_spi_bridge: checks the AHB registers and the SPI master.
//
// An AHB-Lite master task writes TXDATA and CTRL and polls STATUS; an SPI slave
// model (mode 0) records MOSI on rising SCLK edges and drives its own word on
// MISO, changing it on falling edges. For random words on both chip selects the
// test checks the word the slave received, RXDATA, that only the selected chip
// select went low, 16 rising edges per transfer, the SCLK half period of
// SPI_HALF clocks, that STATUS shows busy and then done, and the register
// read-back of TXDATA and CTRL.
module tb_ahb_spi_bridge;
  localparam int unsigned NCS = 2, SH = 3;
  logic clk = 0, rst_n = 0;
  logic hsel = 0, hwrite = 0, hready = 1;
  logic [31:0] haddr = 0, hwdata = 0, hrdata;
  logic [1:0]  htrans = 0;
  logic hreadyout, hresp;
  logic sclk, mosi, miso;
  logic [NCS-1:0] cs_n;
  int checks = 0, failures = 0;

  ahb_spi_bridge #(.NCS(NCS), .SPI_HALF(SH)) dut (.*);
  always #5 clk = !clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  task automatic ahb_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk);
    hsel = 1; htrans = 2'b10; hwrite = 1; haddr = a;
    @(negedge clk);
    hsel = 0; htrans = 2'b00; hwrite = 0; hwdata = d;
    @(negedge clk);
  endtask

  task automatic ahb_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    hsel = 1; htrans = 2'b10; hwrite = 0; haddr = a;
    @(negedge clk);
    hsel = 0; htrans = 2'b00;
    d = hrdata;
  endtask

  // SPI slave model
  logic [15:0] slave_tx, slave_rx, slave_sh;
  int rises = 0, last_edge_t = 0, half_bad = 0;
  logic prev_sclk = 0;
  always @(negedge cs_n[0] or negedge cs_n[1]) begin
    slave_sh = slave_tx; rises = 0;
  end
  assign miso = slave_sh[15];
  always @(posedge sclk) begin
    if (&cs_n) check(0, "SCLK with no chip select");
    slave_rx = {slave_rx[14:0], mosi};
    rises++;
  end
  always @(negedge sclk) slave_sh = slave_sh << 1;
  always @(posedge clk) begin
    if (sclk != prev_sclk) begin
      if (last_edge_t != 0 && ($time - last_edge_t) != SH * 10 && !(&cs_n)) half_bad++;
      last_edge_t = $time;
    end
    prev_sclk = sclk;
  end

  initial begin
    logic [31:0] d;
    logic [15:0] tx;
    int cs, polls;
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(hreadyout && !hresp, "no wait states, no errors");
    for (int n = 0; n < 8; n++) begin
      tx = 16'($urandom); cs = n % 2; slave_tx = 16'($urandom);
      last_edge_t = 0;
      ahb_write(32'h4, {16'hffff, tx});
      ahb_read(32'h4, d);
      check(d == {16'h0, tx}, "TXDATA read-back");
      ahb_write(32'h0, 32'(cs << 8) | 1);
      ahb_read(32'hC, d);
      check(d[0] == 1'b1, "busy during transfer");
      check(cs_n == ~(2'(1) << cs), "selected chip select low");
      polls = 0;
      do begin ahb_read(32'hC, d); polls++; end while (d[0] && polls < 500);
      check(d[1:0] == 2'b10, "done after transfer");
      check(rises == 16, "16 SCLK rising edges");
      check(slave_rx == tx, $sformatf("slave got %h want %h", slave_rx, tx));
      ahb_read(32'h8, d);
      check(d == {16'h0, slave_tx}, $sformatf("RXDATA %h want %h", d[15:0], slave_tx));
      ahb_read(32'h0, d);
      check(d[9:8] == 2'(cs), "CTRL read-back");
      check(&cs_n && !sclk, "bus idle after transfer");
    end
    check(half_bad == 0, "SCLK half period");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
