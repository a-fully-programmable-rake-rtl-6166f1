// partial_network: partial interconnect between memories and computing ports.
//
// Each port of a computing element (vector load/store units, controller) is
// connected to at most one memory, and each single-port memory serves at most
// one port at a time. Which memory a port may reach is fixed by the ALLOWED
// matrix: the network is "partial" because not every memory is wired to every
// port. In the default matrix MEM1/MEM2 reach only the ALU cluster, MEM5 only
// the CMAC cluster, and MEM3/MEM4 both, so MEM3/MEM4 serve as ping-pong
// buffers between the two clusters; the controller reaches all five. Data
// moves between tasks by swapping the memories two ports are connected to,
// never by copying.
// The partial network, the shared memories and swapping follow the document;
// the port list, the matrix (laid out after its ping-pong figure), the
// register interface and the conflict rule are this design's.
//
// Configuration (cfg bus, unit U_NET): reg p (p < NPORT) selects the memory of
// port p (NMEM or above disconnects it); reg 8 swaps the memories of the ports
// in data[7:4] and data[3:0]. A selection that ALLOWED forbids is refused and
// sets cfg_err. If two ports request the same memory in one cycle the lower
// numbered port wins and conflict is set.
// Timing: requests pass combinationally; read data returns one cycle after the
// request through the same selection.
module partial_network
  import rake_pkg::*;
#(
  parameter int unsigned NMEM  = 5,
  parameter int unsigned NPORT = 6,
  parameter logic [NPORT-1:0][NMEM-1:0] ALLOWED = {
    5'b11111,   // port 5: controller
    5'b11100,   // port 4: CMAC store
    5'b11100,   // port 3: CMAC load B
    5'b11100,   // port 2: CMAC load A
    5'b01111,   // port 1: ALU store
    5'b01111    // port 0: ALU load
  }
) (
  input  logic  clk,
  input  logic  rst_n,
  input  cfg_t  cfg,
  input  mreq_t port_req   [NPORT],
  output mvec_t port_rdata [NPORT],
  output mreq_t mem_req    [NMEM],
  input  mvec_t mem_rdata  [NMEM],
  output logic [3:0] sel   [NPORT],
  output logic  cfg_err,
  output logic  conflict
);

  localparam logic [3:0] NONE = 4'hf;
  localparam int unsigned PIW = $clog2(NPORT);   // port index width
  localparam int unsigned MIW = $clog2(NMEM);    // memory index width

  function automatic logic legal(input logic [PIW-1:0] p, input logic [3:0] m);
    return (m == NONE) || (int'(m) < NMEM && ALLOWED[p][m[MIW-1:0]]);
  endfunction

  logic [3:0]     pa, pb, ra, msel;
  logic [PIW-1:0] ia, ib, ir;
  assign pa   = cfg.data[7:4];
  assign pb   = cfg.data[3:0];
  assign ra   = cfg.addr[3:0];
  assign ia   = pa[PIW-1:0];
  assign ib   = pb[PIW-1:0];
  assign ir   = ra[PIW-1:0];
  assign msel = (cfg.data[3:0] >= 4'(NMEM)) ? NONE : cfg.data[3:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORT; p++) sel[p] <= NONE;
      cfg_err <= 1'b0;
    end else if (cfg.we && cfg.addr[7:4] == U_NET) begin
      if (cfg.addr[3:0] == 4'd8) begin
        if (int'(pa) < NPORT && int'(pb) < NPORT && legal(ia, sel[ib]) && legal(ib, sel[ia])) begin
          sel[ia] <= sel[ib];
          sel[ib] <= sel[ia];
        end else begin
          cfg_err <= 1'b1;
        end
      end else if (int'(ra) < NPORT) begin
        if (legal(ir, msel))
          sel[ir] <= msel;
        else
          cfg_err <= 1'b1;
      end
    end
  end

  // Request routing: lowest numbered active port wins each memory.
  always_comb begin
    conflict = 1'b0;
    for (int m = 0; m < NMEM; m++) begin
      logic taken;
      taken      = 1'b0;
      mem_req[m] = '0;
      for (int p = 0; p < NPORT; p++) begin
        if (int'(sel[p]) == m && port_req[p].en) begin
          if (taken) conflict = 1'b1;
          else begin
            mem_req[m] = port_req[p];
            taken      = 1'b1;
          end
        end
      end
    end
  end

  // Read data follows the selection that was in force at the request.
  logic [3:0] sel_q [NPORT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) for (int p = 0; p < NPORT; p++) sel_q[p] <= NONE;
    else        for (int p = 0; p < NPORT; p++) sel_q[p] <= sel[p];
  end

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      port_rdata[p] = '0;
      for (int m = 0; m < NMEM; m++)
        if (int'(sel_q[p]) == m) port_rdata[p] = mem_rdata[m];
    end
  end

endmodule
