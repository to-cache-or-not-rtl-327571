// Port-list and connection helpers for one AXI4 master port.
// AXI_M_PORTS(p, AW, DW) declares the master-side signals with prefix p;
// AXI_M_CONNECT(p, s) connects ports named m_axi_* of an instance to
// signals with prefix s. IDs, cache/prot/qos/lock fields are not carried:
// every transaction uses ID 0.
`ifndef AXI_PORTS_SVH
`define AXI_PORTS_SVH

`define AXI_M_PORTS(p, AW, DW) \
  output logic [AW-1:0]     p``_araddr,  \
  output logic [7:0]        p``_arlen,   \
  output logic [2:0]        p``_arsize,  \
  output logic [1:0]        p``_arburst, \
  output logic              p``_arvalid, \
  input  logic              p``_arready, \
  input  logic [DW-1:0]     p``_rdata,   \
  input  logic [1:0]        p``_rresp,   \
  input  logic              p``_rlast,   \
  input  logic              p``_rvalid,  \
  output logic              p``_rready,  \
  output logic [AW-1:0]     p``_awaddr,  \
  output logic [7:0]        p``_awlen,   \
  output logic [2:0]        p``_awsize,  \
  output logic [1:0]        p``_awburst, \
  output logic              p``_awvalid, \
  input  logic              p``_awready, \
  output logic [DW-1:0]     p``_wdata,   \
  output logic [DW/8-1:0]   p``_wstrb,   \
  output logic              p``_wlast,   \
  output logic              p``_wvalid,  \
  input  logic              p``_wready,  \
  input  logic [1:0]        p``_bresp,   \
  input  logic              p``_bvalid,  \
  output logic              p``_bready

`define AXI_M_CONNECT(p, s) \
  .p``_araddr (s``_araddr),  .p``_arlen  (s``_arlen),  .p``_arsize (s``_arsize), \
  .p``_arburst(s``_arburst), .p``_arvalid(s``_arvalid), .p``_arready(s``_arready), \
  .p``_rdata  (s``_rdata),   .p``_rresp  (s``_rresp),  .p``_rlast  (s``_rlast), \
  .p``_rvalid (s``_rvalid),  .p``_rready (s``_rready), \
  .p``_awaddr (s``_awaddr),  .p``_awlen  (s``_awlen),  .p``_awsize (s``_awsize), \
  .p``_awburst(s``_awburst), .p``_awvalid(s``_awvalid), .p``_awready(s``_awready), \
  .p``_wdata  (s``_wdata),   .p``_wstrb  (s``_wstrb),  .p``_wlast  (s``_wlast), \
  .p``_wvalid (s``_wvalid),  .p``_wready (s``_wready), \
  .p``_bresp  (s``_bresp),   .p``_bvalid (s``_bvalid), .p``_bready (s``_bready)

`define AXI_WIRES(s, AW, DW) \
  logic [AW-1:0] s``_araddr;  logic [7:0] s``_arlen;  logic [2:0] s``_arsize; \
  logic [1:0] s``_arburst;    logic s``_arvalid;      logic s``_arready; \
  logic [DW-1:0] s``_rdata;   logic [1:0] s``_rresp;  logic s``_rlast; \
  logic s``_rvalid;           logic s``_rready; \
  logic [AW-1:0] s``_awaddr;  logic [7:0] s``_awlen;  logic [2:0] s``_awsize; \
  logic [1:0] s``_awburst;    logic s``_awvalid;      logic s``_awready; \
  logic [DW-1:0] s``_wdata;   logic [DW/8-1:0] s``_wstrb; logic s``_wlast; \
  logic s``_wvalid;           logic s``_wready; \
  logic [1:0] s``_bresp;      logic s``_bvalid;       logic s``_bready

`endif
