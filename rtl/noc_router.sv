// noc_router: wormhole router with a fault-tolerant adaptive switch control.
//
// The router has a bidirectional port to each mesh neighbour and one to the
// local IP core: 5 ports for a 2D mesh (LOCAL, EAST, WEST, NORTH, SOUTH) and
// 7 for a 3D mesh (plus UP, DOWN). Every input port has a DEPTH-flit buffer
// (flit_fifo). The switch control (round-robin arbitration plus Gradient or
// Diagonal routing) connects an input carrying a header to an output port;
// the crossbar then streams the whole packet - header, size flit, size payload
// flits - through that connection, and the output is freed after the last
// flit (wormhole switching). Each input tracks the packet with a small phase
// counter that reads the size flit.
//
// Link protocol, per port, for both directions:
//   tx   flit valid from sender
//   data flit
//   ack  back from receiver. FC = FC_HANDSHAKE: ack means "ready", and a flit
//        moves in every cycle with tx && ack. FC = FC_CREDIT: ack is a
//        one-cycle credit return issued when the receiver frees a buffer
//        place; the sender starts with DEPTH credits and only raises tx when it
//        holds one, and every tx is a transfer.
// link_ok[p] = 0 marks the output link p (or the neighbour behind it) faulty;
// the routing then avoids it. Fault detection itself is outside the router.
// Timing with no contention: a header accepted into the buffer at clock edge
// k is routed during the following cycle, connected at edge k+1 and sent at
// edge k+2, i.e. 2 cycles per hop; the rest of the packet follows at one flit
// per cycle.
// The port set, buffers, switch control split into arbitration and routing,
// and the two flow-control schemes follow the HERMES-based router the design
// is built on; the packet format, phase tracking and timing are this design's.
module noc_router
  import noc_pkg::*;
#(
  parameter int         DIM   = 2,
  parameter int         XS    = 4,
  parameter int         YS    = 4,
  parameter int         ZS    = 1,
  parameter int         DEPTH = 8,
  parameter flow_ctrl_e FC    = FC_HANDSHAKE,
  localparam int        NP    = (DIM == 3) ? 7 : 5,
  localparam int        PW    = $clog2(NP)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  coord_t        cur,             // this router's address
  input  logic [NP-1:0] link_ok,         // health of each output link
  input  logic [NP-1:0] in_tx,
  input  flit_t         in_data [NP],
  output logic [NP-1:0] in_ack,
  output logic [NP-1:0] out_tx,
  output flit_t         out_data[NP],
  input  logic [NP-1:0] out_ack,
  output logic          ev_main,         // header routed on its main route
  output logic          ev_alt,          // header routed on an alternative
  output logic          ev_wait,         // header found all usable candidates busy
  output logic          ev_dead,         // header found no usable candidate
  output logic          ev_uturn,        // header left by its arrival port (dead end)
  output logic          ev_stall         // a connected output was held by flow control
);

  localparam int CW = $clog2(DEPTH + 1);

  typedef enum logic [1:0] { PH_HEADER, PH_SIZE, PH_PAYLOAD } phase_e;

  flit_t         head   [NP];
  logic [NP-1:0] hvalid, full, push, pop, req, release_in;
  logic [CW-1:0] fcount [NP];
  phase_e        phase  [NP];
  logic [15:0]   remain [NP];
  coord_t        head_dest [NP];

  logic [NP-1:0] conn_valid, out_busy, out_can, xfer;
  logic [PW-1:0] conn_port [NP];
  logic [PW-1:0] out_src   [NP];
  logic [CW-1:0] credit    [NP];

  // ---------------- input buffers ----------------
  for (genvar i = 0; i < NP; i++) begin : g_in
    assign push[i]   = (FC == FC_HANDSHAKE) ? (in_tx[i] && !full[i]) : in_tx[i];
    assign in_ack[i] = (FC == FC_HANDSHAKE) ? !full[i] : pop[i];

    flit_fifo #(.W(FLIT_W), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n, .push(push[i]), .din(in_data[i]), .pop(pop[i]),
      .dout(head[i]), .valid(hvalid[i]), .full(full[i]), .count(fcount[i])
    );

    assign head_dest[i] = header_dest(head[i]);
    assign req[i]       = hvalid[i] && phase[i] == PH_HEADER && !conn_valid[i];
    assign pop[i]       = conn_valid[i] && hvalid[i] && out_can[conn_port[i]];
    assign release_in[i] = pop[i] &&
                           ((phase[i] == PH_SIZE && head[i][15:0] == 16'd0) ||
                            (phase[i] == PH_PAYLOAD && remain[i] == 16'd1));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        phase[i]  <= PH_HEADER;
        remain[i] <= '0;
      end else if (pop[i]) begin
        case (phase[i])
          PH_HEADER: phase[i] <= PH_SIZE;
          PH_SIZE: begin
            remain[i] <= head[i][15:0];
            phase[i]  <= (head[i][15:0] == 16'd0) ? PH_HEADER : PH_PAYLOAD;
          end
          default: begin
            remain[i] <= remain[i] - 16'd1;
            if (remain[i] == 16'd1) phase[i] <= PH_HEADER;
          end
        endcase
      end
    end
  end

  // ---------------- switch control ----------------
  switch_control #(.DIM(DIM), .XS(XS), .YS(YS), .ZS(ZS)) u_sc (
    .clk, .rst_n, .cur, .req, .head_dest, .link_ok, .release_in,
    .conn_valid, .conn_port, .out_busy, .out_src,
    .ev_main, .ev_alt, .ev_wait, .ev_dead, .ev_uturn
  );

  // ---------------- crossbar and output flow control ----------------
  crossbar #(.NP(NP)) u_xbar (
    .in_flit(head), .sel(out_src), .en(out_busy), .out_flit(out_data)
  );

  for (genvar o = 0; o < NP; o++) begin : g_out
    logic has_flit;
    assign has_flit = out_busy[o] && hvalid[out_src[o]];
    if (FC == FC_HANDSHAKE) begin : g_hs
      assign out_tx[o]  = has_flit;
      assign out_can[o] = out_ack[o];
      assign credit[o]  = '0;
    end else begin : g_cr
      assign out_tx[o]  = has_flit && credit[o] != '0;
      assign out_can[o] = credit[o] != '0;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) credit[o] <= CW'(DEPTH);
        else        credit[o] <= credit[o] - (out_tx[o] ? 1'b1 : 1'b0) + (out_ack[o] ? 1'b1 : 1'b0);
      end
    end
    assign xfer[o] = has_flit && out_can[o];
  end

  assign ev_stall = |(out_busy & ~xfer & {NP{1'b1}} & hvalid_at_out());

  function automatic logic [NP-1:0] hvalid_at_out();
    logic [NP-1:0] r;
    for (int o = 0; o < NP; o++) r[o] = hvalid[out_src[o]];
    return r;
  endfunction

  a_credit_range: assert property (@(posedge clk) disable iff (!rst_n)
    FC == FC_HANDSHAKE || (out_tx & ~out_can) == '0);

endmodule
