// xbar: crossbar switch between the host links and the vaults.
//
// The logic layer of the memory stack has a crossbar that connects the link
// controllers to the vaults; packets are steered by the vault number they
// are tagged with. This is a generic N_IN x N_OUT packet switch: each input
// presents one packet and its destination, each output has its own
// round-robin arbiter over the inputs addressing it, so up to min(N_IN,
// N_OUT) packets move per cycle. It is instantiated once for requests (links
// to vaults) and once for read replies (vaults to links). A packet is one
// transfer here; splitting packets into link flits is left to the link
// controllers.
//
// Interface: valid/ready handshake on every port; a packet moves when its
// input is granted by its output's arbiter and that output is ready.
module xbar #(
  parameter int unsigned N_IN  = 4,
  parameter int unsigned N_OUT = 32,
  parameter int unsigned W     = 32,
  parameter int unsigned DW    = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N_IN-1:0]   in_valid,
  input  logic [DW-1:0]     in_dest [N_IN],
  input  logic [W-1:0]      in_data [N_IN],
  output logic [N_IN-1:0]   in_ready,
  output logic [N_OUT-1:0]  out_valid,
  output logic [W-1:0]      out_data [N_OUT],
  input  logic [N_OUT-1:0]  out_ready
);

  localparam int unsigned IW = (N_IN > 1) ? $clog2(N_IN) : 1;

  logic [N_IN-1:0] req   [N_OUT];
  logic [N_IN-1:0] grant [N_OUT];
  logic [IW-1:0]   gidx  [N_OUT];

  for (genvar o = 0; o < N_OUT; o++) begin : g_out
    always_comb begin
      for (int unsigned i = 0; i < N_IN; i++)
        req[o][i] = in_valid[i] && (in_dest[i] == DW'(o));
    end

    rr_arbiter #(.N(N_IN)) u_arb (
      .clk, .rst_n,
      .req(req[o]), .advance(out_ready[o]),
      .grant(grant[o]), .grant_idx(gidx[o])
    );

    assign out_valid[o] = (grant[o] != '0);
    assign out_data[o]  = in_data[gidx[o]];
  end

  always_comb begin
    in_ready = '0;
    for (int unsigned o = 0; o < N_OUT; o++)
      if (out_ready[o]) in_ready = in_ready | grant[o];
  end

endmodule
