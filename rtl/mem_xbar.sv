// mem_xbar: crossbar of the memory programmer between four buffer macros
// (two pairs) and two clients: the rendering pipeline (back buffer) and the
// memory programmer itself (front buffer). Each client port is a pair of
// macro ports, one per pixel processor (even / odd x). With swap = 0 macros
// 0 and 1 form the back buffer and macros 2 and 3 the front buffer; swap = 1
// exchanges the pairs. Every macro keeps its own read and write bus, so the
// crossbar passes enable, address, write mask and write data one way and
// read data the other. Combinational. Used once for the frame macros (24-bit)
// and once for the depth macros (16-bit).
module mem_xbar #(
  parameter int AW = 15,
  parameter int DW = 24
) (
  input  logic          swap,
  // back-buffer client
  input  logic          bk_en    [2],
  input  logic [AW-1:0] bk_addr  [2],
  input  logic          bk_we    [2],
  input  logic [DW-1:0] bk_wdata [2],
  output logic [DW-1:0] bk_rdata [2],
  // front-buffer client
  input  logic          fr_en    [2],
  input  logic [AW-1:0] fr_addr  [2],
  input  logic          fr_we    [2],
  input  logic [DW-1:0] fr_wdata [2],
  output logic [DW-1:0] fr_rdata [2],
  // macros
  output logic          m_en     [4],
  output logic [AW-1:0] m_addr   [4],
  output logic          m_we     [4],
  output logic [DW-1:0] m_wdata  [4],
  input  logic [DW-1:0] m_rdata  [4]
);
  for (genvar k = 0; k < 2; k++) begin : g_port
    localparam int B = k;       // back pair when swap = 0
    localparam int F = k + 2;   // front pair when swap = 0
    assign m_en[B]    = swap ? fr_en[k]    : bk_en[k];
    assign m_addr[B]  = swap ? fr_addr[k]  : bk_addr[k];
    assign m_we[B]    = swap ? fr_we[k]    : bk_we[k];
    assign m_wdata[B] = swap ? fr_wdata[k] : bk_wdata[k];
    assign m_en[F]    = swap ? bk_en[k]    : fr_en[k];
    assign m_addr[F]  = swap ? bk_addr[k]  : fr_addr[k];
    assign m_we[F]    = swap ? bk_we[k]    : fr_we[k];
    assign m_wdata[F] = swap ? bk_wdata[k] : fr_wdata[k];
    assign bk_rdata[k] = swap ? m_rdata[F] : m_rdata[B];
    assign fr_rdata[k] = swap ? m_rdata[B] : m_rdata[F];
  end
endmodule
