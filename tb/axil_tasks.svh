// axil_tasks.svh: AXI4-lite master tasks for the testbenches.
//
// Included inside a testbench module that declares clk, an axil_req_t variable `req` that it
// drives and an axil_rsp_t `rsp` that it observes. Signals change on the falling edge; a
// handshake is seen at the falling edge before the rising edge that completes it.
task automatic axi_write(input logic [31:0] a, input logic [31:0] d, input logic [3:0] s,
                         output logic [1:0] resp);
  bit aw_go, w_go;
  @(negedge clk);
  req.awaddr = a; req.awvalid = 1'b1; req.wdata = d; req.wstrb = s; req.wvalid = 1'b1; req.bready = 1'b1;
  #1;
  while (req.awvalid || req.wvalid) begin
    aw_go = req.awvalid && rsp.awready;
    w_go  = req.wvalid && rsp.wready;
    @(negedge clk);
    if (aw_go) req.awvalid = 1'b0;
    if (w_go)  req.wvalid  = 1'b0;
    #1;
  end
  while (!rsp.bvalid) begin @(negedge clk); #1; end
  resp = rsp.bresp;
  @(negedge clk);
  req.bready = 1'b0;
endtask

task automatic axi_read(input logic [31:0] a, output logic [31:0] d, output logic [1:0] resp);
  bit go;
  @(negedge clk);
  req.araddr = a; req.arvalid = 1'b1; req.rready = 1'b1;
  #1;
  while (req.arvalid) begin
    go = rsp.arready;
    @(negedge clk);
    if (go) req.arvalid = 1'b0;
    #1;
  end
  while (!rsp.rvalid) begin @(negedge clk); #1; end
  d = rsp.rdata;
  resp = rsp.rresp;
  @(negedge clk);
  req.rready = 1'b0;
endtask
