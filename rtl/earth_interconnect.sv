// earth_interconnect: the interconnection network of an EARTH multiprocessor.
//
// N = 2^(STAGES+1) network interfaces, one per processing node, joined by a
// multistage data network of 4x4 crossbar switches (16 nodes, 3 stages by
// default). Each node talks only to its network interface: it writes a
// message (route commands, ordering tag, data, CLOSE) into the send buffer in
// 2-, 4- or 8-unit pieces and reads what arrives from its receive buffer.
// Messages travel through the switches by virtual cut-through; the route
// commands are consumed on the way, one per stage, so the receiver sees the
// tag, the data and the CLOSE.
//
// Ports are the node-side buses of every interface, indexed by node number;
// see network_interface for their meaning and timing. One clock drives the
// whole network.
module earth_interconnect
  import earth_net_pkg::*;
#(
  parameter int unsigned STAGES        = 3,
  parameter int unsigned FIFO_DEPTH    = 32,
  parameter int unsigned SEND_DEPTH    = 64,
  parameter int unsigned RECEIVE_DEPTH = 64,
  localparam int unsigned N            = 2 ** (STAGES + 1)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cs        [N],
  input  logic        rw        [N],
  input  logic [1:0]  data_type [N],
  input  logic [71:0] data_wr   [N],
  output logic [71:0] data_rd   [N],
  output ni_status_t  status    [N]
);
  unit_t        to_net   [N];
  unit_t        from_net [N];
  logic [N-1:0] send_clk, send_stop, recv_clk, recv_stop;

  for (genvar n = 0; n < N; n++) begin : g_node
    network_interface #(
      .SEND_DEPTH    (SEND_DEPTH),
      .RECEIVE_DEPTH (RECEIVE_DEPTH)
    ) u_ni (
      .clk          (clk),
      .rst          (rst),
      .cs           (cs[n]),
      .rw           (rw[n]),
      .data_type    (data_type[n]),
      .data_wr      (data_wr[n]),
      .data_rd      (data_rd[n]),
      .status       (status[n]),
      .data_out     (to_net[n]),
      .send_clk     (send_clk[n]),
      .send_stop    (send_stop[n]),
      .data_in      (from_net[n]),
      .receive_clk  (recv_clk[n]),
      .receive_stop (recv_stop[n])
    );
  end

  data_network #(
    .STAGES     (STAGES),
    .FIFO_DEPTH (FIFO_DEPTH)
  ) u_net (
    .clk      (clk),
    .rst      (rst),
    .in_data  (to_net),
    .in_wclk  (send_clk),
    .in_stop  (send_stop),
    .out_data (from_net),
    .out_wclk (recv_clk),
    .out_stop (recv_stop)
  );

endmodule
