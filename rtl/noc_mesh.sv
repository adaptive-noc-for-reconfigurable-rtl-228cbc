// noc_mesh: a 2D (DIM = 2) or 3D (DIM = 3) mesh of fault-tolerant routers.
//
// XS x YS (x ZS) noc_router instances are placed on a grid; node n has
// address x = n % XS, y = (n / XS) % YS, z = n / (XS*YS). Each router's EAST
// port faces the WEST port of its east neighbour, NORTH faces SOUTH, UP faces
// DOWN, using the router's tx/data/ack link. Ports on the mesh border are left
// idle. The LOCAL port of every router is brought out for the IP cores.
// Faults: node_fault[n] makes every neighbour treat the links towards node n
// as broken; link_fault[n][p] breaks the output link p of node n. The routers
// route around both (Gradient in 2D, Diagonal in 3D). Event outputs are the
// per-router pulses of noc_router, one bit per node.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int         DIM   = 2,
  parameter int         XS    = 4,
  parameter int         YS    = 4,
  parameter int         ZS    = 1,
  parameter int         DEPTH = 8,
  parameter flow_ctrl_e FC    = FC_HANDSHAKE,
  localparam int        NP    = (DIM == 3) ? 7 : 5,
  localparam int        N     = XS * YS * ZS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [N-1:0]           node_fault,
  input  logic [N-1:0][NP-1:0]   link_fault,
  // local ports: IP core -> network
  input  logic [N-1:0]           lin_tx,
  input  flit_t                  lin_data [N],
  output logic [N-1:0]           lin_ack,
  // local ports: network -> IP core
  output logic [N-1:0]           lout_tx,
  output flit_t                  lout_data[N],
  input  logic [N-1:0]           lout_ack,
  output logic [N-1:0]           ev_main,
  output logic [N-1:0]           ev_alt,
  output logic [N-1:0]           ev_wait,
  output logic [N-1:0]           ev_dead,
  output logic [N-1:0]           ev_uturn,
  output logic [N-1:0]           ev_stall
);

  logic [NP-1:0] in_tx  [N];
  logic [NP-1:0] in_ack [N];
  logic [NP-1:0] out_tx [N];
  logic [NP-1:0] out_ack[N];
  flit_t         in_data [N][NP];
  flit_t         out_data[N][NP];

  // neighbour of node n through port p, or -1 on the border
  function automatic int nb(int n, int p);
    int x, y, z;
    x = n % XS;
    y = (n / XS) % YS;
    z = n / (XS * YS);
    case (p)
      int'(P_EAST):  return (x < XS - 1) ? n + 1 : -1;
      int'(P_WEST):  return (x > 0) ? n - 1 : -1;
      int'(P_NORTH): return (y < YS - 1) ? n + XS : -1;
      int'(P_SOUTH): return (y > 0) ? n - XS : -1;
      int'(P_UP):    return (z < ZS - 1) ? n + XS * YS : -1;
      int'(P_DOWN):  return (z > 0) ? n - XS * YS : -1;
      default:       return -1;
    endcase
  endfunction

  function automatic int opp(int p);
    return int'(opposite(port_e'(p)));
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_node
    coord_t        addr;
    logic [NP-1:0] link_ok;

    assign addr.x = COORD_W'(n % XS);
    assign addr.y = COORD_W'((n / XS) % YS);
    assign addr.z = COORD_W'(n / (XS * YS));

    // local port
    assign in_tx[n][P_LOCAL]   = lin_tx[n];
    assign in_data[n][P_LOCAL] = lin_data[n];
    assign lin_ack[n]          = in_ack[n][P_LOCAL];
    assign lout_tx[n]          = out_tx[n][P_LOCAL];
    assign lout_data[n]        = out_data[n][P_LOCAL];
    assign out_ack[n][P_LOCAL] = lout_ack[n];
    assign link_ok[P_LOCAL]    = 1'b1;

    for (genvar p = 1; p < NP; p++) begin : g_port
      localparam int M = nb(n, p);
      if (M >= 0) begin : g_link
        assign in_tx[n][p]   = out_tx[M][opp(p)];
        assign in_data[n][p] = out_data[M][opp(p)];
        assign out_ack[n][p] = in_ack[M][opp(p)];
        assign link_ok[p]    = !link_fault[n][p] && !node_fault[M];
      end else begin : g_edge
        assign in_tx[n][p]   = 1'b0;
        assign in_data[n][p] = '0;
        assign out_ack[n][p] = 1'b0;
        assign link_ok[p]    = 1'b0;
      end
    end

    noc_router #(.DIM(DIM), .XS(XS), .YS(YS), .ZS(ZS), .DEPTH(DEPTH), .FC(FC)) u_router (
      .clk, .rst_n, .cur(addr), .link_ok,
      .in_tx(in_tx[n]), .in_data(in_data[n]), .in_ack(in_ack[n]),
      .out_tx(out_tx[n]), .out_data(out_data[n]), .out_ack(out_ack[n]),
      .ev_main(ev_main[n]), .ev_alt(ev_alt[n]), .ev_wait(ev_wait[n]),
      .ev_dead(ev_dead[n]), .ev_uturn(ev_uturn[n]), .ev_stall(ev_stall[n])
    );
  end

endmodule
