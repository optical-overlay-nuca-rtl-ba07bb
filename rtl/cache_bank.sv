// cache_bank: one L2 cache bank (128 KB, 8-way, 64-byte lines, 2048 lines).
//
// Three operations, one at a time, each answered LATENCY cycles after it is
// accepted (resp_valid for one cycle):
//  * OP_LOOKUP: tag search of the set; resp_hit/resp_data/resp_idx. With
//    `inval` set a hit also removes the line (used when the line migrates).
//  * OP_FILL:   writes the line. If it is already present it is overwritten;
//    otherwise an invalid way is used, or the way named by the set's
//    round-robin pointer, whose line comes out on victim_*.
//  * OP_INVAL:  removes line `idx` (set * 8 + way) and returns it on victim_*
//    if it was valid (reconfiguration evictions).
// resp_idx is the line index touched. The array is updated when the
// operation is accepted; only the answer is delayed. Size, associativity and
// the 8-cycle latency are the document's; the replacement policy and the
// single outstanding operation are this design's choices. The tag keeps all
// address bits above the set index, so lines of other home banks can live
// here.
module cache_bank
  import onuca_pkg::*;
#(
  parameter int LATENCY = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  req_valid,
  input  logic [1:0]            req_op,     // 0 lookup, 1 fill, 2 invalidate
  input  logic [ADDR_W-1:0]     req_addr,
  input  logic                  req_inval,  // lookup: remove on hit
  input  logic [LINE_BITS-1:0]  req_data,   // fill data
  input  logic [LINE_IDX_W-1:0] req_idx,    // invalidate: line index
  output logic                  req_ready,
  output logic                  resp_valid,
  output logic                  resp_hit,
  output logic [LINE_BITS-1:0]  resp_data,
  output logic [LINE_IDX_W-1:0] resp_idx,
  output logic                  victim_valid,
  output logic [ADDR_W-1:0]     victim_addr,
  output logic [LINE_BITS-1:0]  victim_data
);
  localparam logic [1:0] OP_LOOKUP = 2'd0, OP_FILL = 2'd1, OP_INVAL = 2'd2;

  logic [LINE_BITS-1:0] data_q [LINES];
  logic [TAG_W-1:0]     tag_q  [LINES];
  logic [LINES-1:0]     valid_q;
  logic [SETS-1:0][2:0] rr_q;

  logic [$clog2(LATENCY+1)-1:0] busy_cnt;

  // tag match and victim choice for the request's set
  logic [SET_W-1:0]      set;
  logic                  hit, has_inv;
  logic [2:0]            hit_way, inv_way, fill_way;
  logic [LINE_IDX_W-1:0] hit_idx, fill_idx;
  always_comb begin
    set = set_of(req_addr);
    hit = 1'b0; hit_way = '0; has_inv = 1'b0; inv_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid_q[{set, 3'(w)}] && tag_q[{set, 3'(w)}] == tag_of(req_addr)) begin
        hit = 1'b1; hit_way = 3'(w);
      end
      if (!valid_q[{set, 3'(w)}]) begin has_inv = 1'b1; inv_way = 3'(w); end
    end
    fill_way = hit ? hit_way : (has_inv ? inv_way : rr_q[set]);
    hit_idx  = {set, hit_way};
    fill_idx = {set, fill_way};
  end

  assign req_ready = (busy_cnt == '0);
  wire accept = req_valid && req_ready;

  // control state, reset
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q      <= '0;
      rr_q         <= '0;
      busy_cnt     <= '0;
      resp_valid   <= 1'b0;
      resp_hit     <= 1'b0;
      victim_valid <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      if (busy_cnt != '0) begin
        busy_cnt <= busy_cnt - 1'b1;
        if (busy_cnt == 1) resp_valid <= 1'b1;
      end
      if (accept) begin
        busy_cnt     <= ($clog2(LATENCY+1))'(LATENCY);
        victim_valid <= 1'b0;
        resp_hit     <= 1'b0;
        unique case (req_op)
          OP_LOOKUP: begin
            resp_hit <= hit;
            if (hit && req_inval) valid_q[hit_idx] <= 1'b0;
          end
          OP_FILL: begin
            resp_hit <= hit;
            if (!hit && !has_inv) begin
              victim_valid <= 1'b1;
              rr_q[set]    <= rr_q[set] + 3'd1;
            end
            valid_q[fill_idx] <= 1'b1;
          end
          OP_INVAL: begin
            resp_hit         <= valid_q[req_idx];
            victim_valid     <= valid_q[req_idx];
            valid_q[req_idx] <= 1'b0;
          end
          default: ;
        endcase
      end
    end
  end

  // tag and data arrays and the data outputs, not reset (SRAM-like)
  always_ff @(posedge clk) begin
    if (accept) begin
      unique case (req_op)
        OP_LOOKUP: begin
          resp_data <= data_q[hit_idx];
          resp_idx  <= hit_idx;
        end
        OP_FILL: begin
          resp_idx    <= fill_idx;
          victim_addr <= {tag_q[fill_idx], set, {OFF_W{1'b0}}};
          victim_data <= data_q[fill_idx];
          tag_q[fill_idx]  <= tag_of(req_addr);
          data_q[fill_idx] <= req_data;
        end
        OP_INVAL: begin
          resp_idx    <= req_idx;
          victim_addr <= {tag_q[req_idx], req_idx[LINE_IDX_W-1:3], {OFF_W{1'b0}}};
          victim_data <= data_q[req_idx];
        end
        default: ;
      endcase
    end
  end
endmodule
