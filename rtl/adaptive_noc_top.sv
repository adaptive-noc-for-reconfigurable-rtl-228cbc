// adaptive_noc_top: the two fault-tolerant networks side by side.
//
//   m2_*  2D mesh of XS2 x YS2 five-port routers with Gradient routing,
//         32-bit flits, 8-flit input buffers, handshake flow control
//         (the 4x4 FPGA configuration).
//   m3_*  3D mesh of XS3 x YS3 x ZS3 seven-port routers with Diagonal routing,
//         4-flit input buffers (the 3x3x3 configuration of the 3D evaluation).
// Each network exposes the local port of every router (IP core side), a
// node-fault and link-fault mask that the routing avoids, and per-router
// event pulses (main route, alternative route, wait, dead end, U-turn out
// of a dead end, flow-control stall). The two networks share only clock and reset.
// Sizes, flit width and buffer depths follow the evaluated configurations;
// the use of handshake flow control in the 3D network is this design's choice.
module adaptive_noc_top
  import noc_pkg::*;
#(
  parameter int         XS2    = 4,
  parameter int         YS2    = 4,
  parameter int         DEPTH2 = 8,
  parameter flow_ctrl_e FC2    = FC_HANDSHAKE,
  parameter int         XS3    = 3,
  parameter int         YS3    = 3,
  parameter int         ZS3    = 3,
  parameter int         DEPTH3 = 4,
  parameter flow_ctrl_e FC3    = FC_HANDSHAKE,
  localparam int        N2     = XS2 * YS2,
  localparam int        N3     = XS3 * YS3 * ZS3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // 2D Gradient network
  input  logic [N2-1:0]        m2_node_fault,
  input  logic [N2-1:0][4:0]   m2_link_fault,
  input  logic [N2-1:0]        m2_lin_tx,
  input  flit_t                m2_lin_data [N2],
  output logic [N2-1:0]        m2_lin_ack,
  output logic [N2-1:0]        m2_lout_tx,
  output flit_t                m2_lout_data[N2],
  input  logic [N2-1:0]        m2_lout_ack,
  output logic [N2-1:0]        m2_ev_main,
  output logic [N2-1:0]        m2_ev_alt,
  output logic [N2-1:0]        m2_ev_wait,
  output logic [N2-1:0]        m2_ev_dead,
  output logic [N2-1:0]        m2_ev_uturn,
  output logic [N2-1:0]        m2_ev_stall,
  // 3D Diagonal network
  input  logic [N3-1:0]        m3_node_fault,
  input  logic [N3-1:0][6:0]   m3_link_fault,
  input  logic [N3-1:0]        m3_lin_tx,
  input  flit_t                m3_lin_data [N3],
  output logic [N3-1:0]        m3_lin_ack,
  output logic [N3-1:0]        m3_lout_tx,
  output flit_t                m3_lout_data[N3],
  input  logic [N3-1:0]        m3_lout_ack,
  output logic [N3-1:0]        m3_ev_main,
  output logic [N3-1:0]        m3_ev_alt,
  output logic [N3-1:0]        m3_ev_wait,
  output logic [N3-1:0]        m3_ev_dead,
  output logic [N3-1:0]        m3_ev_uturn,
  output logic [N3-1:0]        m3_ev_stall
);

  noc_mesh #(.DIM(2), .XS(XS2), .YS(YS2), .ZS(1), .DEPTH(DEPTH2), .FC(FC2)) u_mesh2d (
    .clk, .rst_n,
    .node_fault(m2_node_fault), .link_fault(m2_link_fault),
    .lin_tx(m2_lin_tx), .lin_data(m2_lin_data), .lin_ack(m2_lin_ack),
    .lout_tx(m2_lout_tx), .lout_data(m2_lout_data), .lout_ack(m2_lout_ack),
    .ev_main(m2_ev_main), .ev_alt(m2_ev_alt), .ev_wait(m2_ev_wait),
    .ev_dead(m2_ev_dead), .ev_uturn(m2_ev_uturn), .ev_stall(m2_ev_stall)
  );

  noc_mesh #(.DIM(3), .XS(XS3), .YS(YS3), .ZS(ZS3), .DEPTH(DEPTH3), .FC(FC3)) u_mesh3d (
    .clk, .rst_n,
    .node_fault(m3_node_fault), .link_fault(m3_link_fault),
    .lin_tx(m3_lin_tx), .lin_data(m3_lin_data), .lin_ack(m3_lin_ack),
    .lout_tx(m3_lout_tx), .lout_data(m3_lout_data), .lout_ack(m3_lout_ack),
    .ev_main(m3_ev_main), .ev_alt(m3_ev_alt), .ev_wait(m3_ev_wait),
    .ev_dead(m3_ev_dead), .ev_uturn(m3_ev_uturn), .ev_stall(m3_ev_stall)
  );

endmodule
