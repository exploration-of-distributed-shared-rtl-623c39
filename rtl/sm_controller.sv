// sm_controller: shared memory controller of one distributed shared memory
// module, with its RAM bank.
//
// Serves the requests that reach it through its network interface:
//   OP_SM_RD  a=byte address        -> OP_SM_RDATA a=word
//   OP_SM_WR  a=byte address, b=word -> OP_SM_WACK
//   OP_SM_WAKE / OP_SM_SLEEP        -> set the power state (no reply)
// The reply goes back to the requester (the message's source node). While
// the module sleeps it answers every read or write with OP_SM_ERR. Only the
// hardware MMU sends the power commands; the software cannot.
//
// Timing: a request is taken in one cycle, the RAM is read in the next, and
// the reply is offered to the NI in the cycle after that; one request at a
// time.
//
// Following the document: the module is on-chip RAM without caching, holds
// whole 4 KB pages and has an active and a sleep state driven by the HwMMU.
// This design's choices: the module sleeps after reset, and an access to a
// sleeping module returns an error reply.
module sm_controller
  import dsm_pkg::*;
#(
  parameter int unsigned PAGES      = 43,
  parameter int unsigned PAGE_WORDS = 1024
) (
  input  logic clk,
  input  logic rst_n,
  input  msg_t rx_msg,
  input  logic rx_valid,
  output logic rx_ready,
  output msg_t tx_msg,
  output logic tx_valid,
  input  logic tx_ready,
  output logic sleeping,
  output logic [31:0] access_count   // reads and writes served
);
  localparam int unsigned WORDS = PAGES * PAGE_WORDS;
  localparam int unsigned AW    = $clog2(WORDS);

  typedef enum logic [1:0] {S_IDLE, S_ACCESS, S_REPLY} state_e;
  state_e state;

  logic          bank_en, bank_we;
  logic [AW-1:0] bank_addr;
  logic [31:0]   bank_rdata;
  msg_t          req;       // request being served

  sm_bank #(.WORDS(WORDS)) u_bank (
    .clk, .en(bank_en), .we(bank_we), .addr(bank_addr),
    .wdata(rx_msg.b), .rdata(bank_rdata)
  );

  logic in_range;
  assign in_range  = (rx_msg.a >> 2) < 32'(WORDS);
  assign rx_ready  = (state == S_IDLE);
  assign bank_addr = AW'(rx_msg.a >> 2);
  assign bank_en   = rx_valid && rx_ready && !sleeping && in_range &&
                     (rx_msg.op == OP_SM_RD || rx_msg.op == OP_SM_WR);
  assign bank_we   = (rx_msg.op == OP_SM_WR);

  assign tx_valid = (state == S_REPLY);
  always_comb begin
    tx_msg     = '0;
    tx_msg.dst = req.src;
    tx_msg.op  = OP_SM_ERR;
    if (req.op == OP_SM_RD) begin
      tx_msg.op = OP_SM_RDATA;
      tx_msg.a  = bank_rdata;
    end else if (req.op == OP_SM_WR) begin
      tx_msg.op = OP_SM_WACK;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      sleeping     <= 1'b1;
      req          <= '0;
      access_count <= '0;
    end else begin
      case (state)
        S_IDLE: if (rx_valid) begin
          req <= rx_msg;
          case (rx_msg.op)
            OP_SM_WAKE:  sleeping <= 1'b0;
            OP_SM_SLEEP: sleeping <= 1'b1;
            OP_SM_RD, OP_SM_WR: begin
              if (sleeping || !in_range) req.op <= OP_SM_ERR;
              else access_count <= access_count + 1;
              state <= S_ACCESS;
            end
            default: ;  // anything else is dropped
          endcase
        end
        S_ACCESS: state <= S_REPLY;
        S_REPLY:  if (tx_ready) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end
endmodule
