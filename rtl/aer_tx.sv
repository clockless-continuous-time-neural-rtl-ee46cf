// aer_tx: address-event output of the channel.
//
// A classified spike is sent as one address event {CHANNEL_ID, class} over a
// four-phase request/acknowledge handshake: load (one cycle, with cls) raises
// req with the address held stable; the receiver raises ack; req falls; the
// receiver drops ack; the sender is then ready again. ready is low from load
// until ack has fallen, and load is ignored while not ready. ack is assumed
// synchronous to clk.
//
// From the document: the spike is reported as an address event. The
// handshake and the address format are this design's own.
module aer_tx #(
  parameter int CH_W       = 4,
  parameter int CLS_W      = 2,
  parameter int CHANNEL_ID = 0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  load,
  input  logic [CLS_W-1:0]      cls,
  output logic                  ready,
  output logic                  req,
  input  logic                  ack,
  output logic [CH_W+CLS_W-1:0] addr
);

  typedef enum logic [1:0] {IDLE, REQ, WAIT_ACK_LOW} aer_state_t;

  aer_state_t state;

  assign ready = (state == IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      req   <= 1'b0;
      addr  <= '0;
    end else begin
      unique case (state)
        IDLE: if (load) begin
          addr  <= {CH_W'(CHANNEL_ID), cls};
          req   <= 1'b1;
          state <= REQ;
        end
        REQ: if (ack) begin
          req   <= 1'b0;
          state <= WAIT_ACK_LOW;
        end
        WAIT_ACK_LOW: if (!ack) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // The address must not change while a request is outstanding.
  a_addr_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  req && !ack |=> $stable(addr));
  // A request is not withdrawn before it is acknowledged.
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
                               req && !ack |=> req);

endmodule
