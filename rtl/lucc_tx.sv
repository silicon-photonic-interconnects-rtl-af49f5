// lucc_tx: traffic source of one switch input (traffic generation, access
// request and transmitter).
//
// On a command (cmd_valid with cmd_dst and cmd_len, taken when cmd_ready) it
// pulses link_req with link_dst to the controller and waits for ack. From the
// cycle after ack it sends cmd_len payload bits, one per cycle: tx_on gates
// the laser/modulator and tx_bit carries a PRBS-7 sequence (x^7 + x^6 + 1)
// whose register is seeded with SEED at reset and runs only while sending, so
// a receiver can tell which source it sees. After the last bit it pulses tail
// and waits for tail_ack, then pulses done and takes the next command.
// The published LUCC design names these functions and the LinkReq/Ack/Tail/TailAck signals;
// the command interface, the PRBS payload and the pulse timing are this
// design's choices.
module lucc_tx #(
  parameter int unsigned N     = 4,
  parameter int unsigned LEN_W = 16,
  parameter logic [6:0]  SEED  = 7'h7f,
  localparam int unsigned DW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cmd_valid,
  input  logic [DW-1:0]    cmd_dst,
  input  logic [LEN_W-1:0] cmd_len,
  output logic             cmd_ready,
  output logic             done,
  output logic             link_req,
  output logic [DW-1:0]    link_dst,
  input  logic             ack,
  output logic             tail,
  input  logic             tail_ack,
  output logic             tx_on,
  output logic             tx_bit
);

  typedef enum logic [2:0] {
    TX_IDLE, TX_WAIT_ACK, TX_SEND, TX_WAIT_TACK
  } tx_state_e;

  tx_state_e        state;
  logic [LEN_W-1:0] left;
  logic [6:0]       prbs;

  assign cmd_ready = (state == TX_IDLE);
  assign tx_on     = (state == TX_SEND);
  assign tx_bit    = tx_on & prbs[6];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= TX_IDLE;
      left     <= '0;
      prbs     <= SEED;
      link_req <= 1'b0;
      link_dst <= '0;
      tail     <= 1'b0;
      done     <= 1'b0;
    end else begin
      link_req <= 1'b0;
      tail     <= 1'b0;
      done     <= 1'b0;
      unique case (state)
        TX_IDLE: if (cmd_valid && cmd_len != '0) begin
          link_req <= 1'b1;
          link_dst <= cmd_dst;
          left     <= cmd_len;
          state    <= TX_WAIT_ACK;
        end
        TX_WAIT_ACK: if (ack) state <= TX_SEND;
        TX_SEND: begin
          prbs <= {prbs[5:0], prbs[6] ^ prbs[5]};
          left <= left - 1'b1;
          if (left == LEN_W'(1)) begin
            tail  <= 1'b1;
            state <= TX_WAIT_TACK;
          end
        end
        TX_WAIT_TACK: if (tail_ack) begin
          done  <= 1'b1;
          state <= TX_IDLE;
        end
        default: state <= TX_IDLE;
      endcase
    end
  end

endmodule
