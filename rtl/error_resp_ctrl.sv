`timescale 1ps/1ps
// error_resp_ctrl: read issue and replay-based recovery from timing errors.
//
// Accepts read requests (valid/ready), issues them to the array one per cycle
// and returns the data in order, but only once the read is known to be free of
// a detected timing error. Read latency: a read issued in cycle c has its data
// (`rd_dout`) in cycle c+2 and its error flag (`err_flag`, TED result from the
// error compaction) in cycle c+3; an error-free response leaves on the
// registered `rsp_*` outputs in cycle c+4.
//
// On an error the failing read and the up to two reads behind it are
// squashed and queued for replay. The controller then requests the recovery
// condition -- the F/2 clock (`slow_clk`) or, with `replay_use_v`, a raised
// supply (`v_boost`) -- waits SETTLE_CYCLES cycles for it to take effect and
// repeats the queued reads one at a time. A replay that fails again is
// repeated. When the queue is empty the normal clock and supply are restored
// and new requests are accepted. Each detected error gives one `err_event`
// pulse, which feeds the error rate tracker.
//
// Repeating the read at F/2 or 1.1x Vcc follows the source design; the queue,
// the squash of the reads behind the failing one, the one-at-a-time replay and
// SETTLE_CYCLES are this implementation's choices.
module error_resp_ctrl #(
  parameter int unsigned AW            = 12,
  parameter int unsigned WIDTH         = 32,
  parameter int unsigned SETTLE_CYCLES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  // requests
  input  logic             req_valid,
  input  logic [AW-1:0]    req_addr,
  output logic             req_ready,
  // array read port
  output logic             rd_en,
  output logic [AW-1:0]    rd_addr,
  input  logic [WIDTH-1:0] rd_dout,
  input  logic             err_flag,
  // recovery control
  input  logic             replay_use_v,
  output logic             slow_clk,
  output logic             v_boost,
  output logic             replaying,
  output logic             err_event,
  // responses
  output logic             rsp_valid,
  output logic [AW-1:0]    rsp_addr,
  output logic [WIDTH-1:0] rsp_data
);

  typedef enum logic [1:0] {S_NORMAL, S_SETTLE, S_ISSUE, S_WAIT} state_e;

  typedef struct packed {
    logic          valid;
    logic [AW-1:0] addr;
  } rd_tag_t;

  localparam int unsigned SW = $clog2(SETTLE_CYCLES + 1);

  state_e           state;
  rd_tag_t          p1, p2, p3;
  logic [WIDTH-1:0] p3_data;
  logic [AW-1:0]    q [3];
  logic [1:0]       qn;
  logic [SW-1:0]    settle_cnt;
  logic             err;

  assign err       = p3.valid && err_flag;
  assign err_event = err;
  assign replaying = (state != S_NORMAL);
  assign slow_clk  = replaying && !replay_use_v;
  assign v_boost   = replaying &&  replay_use_v;

  assign req_ready = (state == S_NORMAL) && !err;

  always_comb begin
    rd_en   = 1'b0;
    rd_addr = req_addr;
    if (state == S_NORMAL) begin
      rd_en = req_valid && req_ready;
    end else if (state == S_ISSUE) begin
      rd_en   = 1'b1;
      rd_addr = q[0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_NORMAL;
      p1         <= '0;
      p2         <= '0;
      p3         <= '0;
      p3_data    <= '0;
      q[0]       <= '0;
      q[1]       <= '0;
      q[2]       <= '0;
      qn         <= '0;
      settle_cnt <= '0;
      rsp_valid  <= 1'b0;
      rsp_addr   <= '0;
      rsp_data   <= '0;
    end else begin
      // read pipeline tracking
      p1      <= '{valid: rd_en, addr: rd_addr};
      p2      <= p1;
      p3      <= p2;
      p3_data <= rd_dout;
      rsp_valid <= 1'b0;

      if (err) begin
        // squash everything behind the failing read
        p2 <= '0;
        p3 <= '0;
      end

      unique case (state)
        S_NORMAL: begin
          if (err) begin
            q[0] <= p3.addr;
            if (p2.valid) begin
              q[1] <= p2.addr;
              q[2] <= p1.addr;
              qn   <= p1.valid ? 2'd3 : 2'd2;
            end else if (p1.valid) begin
              q[1] <= p1.addr;
              qn   <= 2'd2;
            end else begin
              qn   <= 2'd1;
            end
            settle_cnt <= '0;
            state      <= S_SETTLE;
          end else if (p3.valid) begin
            rsp_valid <= 1'b1;
            rsp_addr  <= p3.addr;
            rsp_data  <= p3_data;
          end
        end
        S_SETTLE: begin
          if (32'(settle_cnt) >= SETTLE_CYCLES - 1) state <= S_ISSUE;
          else settle_cnt <= settle_cnt + 1'b1;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: begin
          if (p3.valid) begin
            if (!err) begin
              rsp_valid <= 1'b1;
              rsp_addr  <= p3.addr;
              rsp_data  <= p3_data;
              q[0] <= q[1];
              q[1] <= q[2];
              qn   <= qn - 1'b1;
              state <= (qn == 2'd1) ? S_NORMAL : S_ISSUE;
            end else begin
              state <= S_ISSUE;
            end
          end
        end
        default: state <= S_NORMAL;
      endcase
    end
  end

endmodule
