// fvc_net_model: behavioural stand-in for the mesh of routers, for testbenches.
//
// Every destination port is a lock: when it is free it grants, round robin,
// one source whose waiting head flit names it (dst in payload bits [7:0]),
// and then forwards that source's flits until the tail flit has passed, so a
// message reaches its destination contiguously and the messages of one
// source-destination pair stay in order. Each destination port passes a flit
// only in a random PASS_PCT percent of cycles, which models contention on
// the way and makes the interfaces see back-pressure. Flits pass
// combinationally from source to destination once granted.
module fvc_net_model #(
  parameter int N        = 24,
  parameter int PASS_PCT = 80
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [N-1:0]               fo_valid,
  output logic [N-1:0]               fo_ready,
  input  fvc_pkg::flit_t [N-1:0]     fo_flit,
  output logic [N-1:0]               fi_valid,
  input  logic [N-1:0]               fi_ready,
  output fvc_pkg::flit_t [N-1:0]     fi_flit
);
  logic [N-1:0] own_vld, open_q;
  int           owner [N];
  int           rr [N];

  always_comb begin
    fo_ready = '0;
    for (int d = 0; d < N; d++) begin
      fi_valid[d] = 1'b0;
      fi_flit[d]  = '0;
      if (own_vld[d] && open_q[d]) begin
        fi_valid[d] = fo_valid[owner[d]];
        fi_flit[d]  = fo_flit[owner[d]];
        fo_ready[owner[d]] = fi_ready[d];
      end
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      own_vld <= '0;
      open_q  <= '0;
      for (int d = 0; d < N; d++) begin owner[d] <= 0; rr[d] <= 0; end
    end else begin
      for (int d = 0; d < N; d++) begin
        open_q[d] <= int'($urandom_range(99)) < PASS_PCT;
        if (own_vld[d]) begin
          if (open_q[d] && fi_valid[d] && fi_ready[d] && fi_flit[d].tail) own_vld[d] <= 1'b0;
        end else begin
          bit found;
          found = 1'b0;
          for (int k = 0; k < N; k++) begin
            int s;
            s = (rr[d] + k) % N;
            if (!found && fo_valid[s] && fo_flit[s].head && int'(fo_flit[s].data[7:0]) == d) begin
              found       = 1'b1;
              own_vld[d] <= 1'b1;
              owner[d]   <= s;
              rr[d]      <= (s + 1) % N;
            end
          end
        end
      end
    end
  end
endmodule
