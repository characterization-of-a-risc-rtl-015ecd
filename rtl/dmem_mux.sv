// dmem_mux: routes each data access of the core to the data memory or to the AXI4-lite master.
//
// The select (S0 in the SoC diagram) is decoded from the access address: 0 = data memory for
// addresses with addr[31:30] == 2'b00 (soc_pkg::is_dmem_addr), 1 = AXI4-lite master for all
// others (peripherals and flash). The document says only that the target is chosen by the
// address; the split itself is this design's choice. The core holds its request stable until
// the grant, so the select is simply combinational on the address. Only the selected side
// sees a request, so the grant is the OR of both grants, and the load data is taken from the
// side that grants; this keeps the grant independent of the address, which would otherwise
// close a combinational path from the grant through the core back to the address. The error
// flags come from the data memory only: the AXI side carries no ECC.
module dmem_mux
  import soc_pkg::*;
(
  // from the core
  input  logic        req,
  input  logic        we,
  input  logic [3:0]  be,
  input  logic [31:0] addr,
  input  logic [31:0] wdata,
  output logic        gnt,
  output logic [31:0] rdata,
  output logic        err_single,
  output logic        err_double,
  // to the data memory (select 0)
  output logic        mem_req,
  input  logic        mem_gnt,
  input  logic [31:0] mem_rdata,
  input  logic        mem_err_single,
  input  logic        mem_err_double,
  // to the AXI4-lite master (select 1)
  output logic        bus_req,
  input  logic        bus_gnt,
  input  logic [31:0] bus_rdata,
  // shared request fields
  output logic        out_we,
  output logic [3:0]  out_be,
  output logic [31:0] out_addr,
  output logic [31:0] out_wdata
);
  logic sel;
  always_comb begin
    sel        = !is_dmem_addr(addr);
    mem_req    = req && !sel;
    bus_req    = req && sel;
    out_we     = we;
    out_be     = be;
    out_addr   = addr;
    out_wdata  = wdata;
    gnt        = bus_gnt || mem_gnt;
    rdata      = bus_gnt ? bus_rdata : mem_rdata;
    err_single = mem_gnt && mem_err_single;
    err_double = mem_gnt && mem_err_double;
  end
endmodule
