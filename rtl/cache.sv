// Blocking, direct-mapped, write-back, write-allocate cache.
//
// 16 lines of 16 bytes (128 bits). The processor side carries 4-byte memory
// messages (mem_req_4B_t / mem_resp_4B_t), the memory side whole lines
// (mem_req_16B_t / mem_resp_16B_t). Address layout with p_num_banks banks and
// B = log2(p_num_banks):
//
//   [31 : 8+B] tag | [7+B : 4+B] index | [3+B : 4] bank | [3:2] word | [1:0] byte
//
// so with four banks the two bank bits sit between the index and the line
// offset and the tag shrinks to 22 bits; with one bank the tag is 24 bits.
// All addresses reaching one bank share its bank bits, so a victim's address
// is rebuilt from its tag, its index and the current request's bank bits.
//
// One request is handled at a time. A hit walks IDLE (accept) -> TAG_CHECK ->
// DATA_ACCESS -> WAIT (response valid): a four-cycle hit, the response valid
// three cycles after the request is accepted and the next request taken the
// cycle after the response leaves. A miss writes back a dirty victim line
// (EVICT_REQ, EVICT_WAIT), reads the new line (REFILL_REQ, REFILL_WAIT) and
// then does the access. Sub-word accesses: len 1 is a byte, len 2 a halfword,
// len 0 a word; reads return the addressed bytes in the low bits of the data
// field, writes take them from the low bits. The opaque field and type are
// echoed; test[0] reports a hit. Memory requests carry opaque 0.
module cache
  import mcore_pkg::*;
#(
  parameter int unsigned p_num_banks = 1,
  parameter int unsigned p_num_lines = 16
)(
  input  logic          clk,
  input  logic          reset,

  input  logic          cachereq_val,
  output logic          cachereq_rdy,
  input  mem_req_4B_t   cachereq_msg,

  output logic          cacheresp_val,
  input  logic          cacheresp_rdy,
  output mem_resp_4B_t  cacheresp_msg,

  output logic          memreq_val,
  input  logic          memreq_rdy,
  output mem_req_16B_t  memreq_msg,

  input  logic          memresp_val,
  output logic          memresp_rdy,
  input  mem_resp_16B_t memresp_msg
);

  localparam int unsigned BB = (p_num_banks > 1) ? $clog2(p_num_banks) : 0;
  localparam int unsigned IB = $clog2(p_num_lines);
  localparam int unsigned TB = 32 - 4 - BB - IB;

  typedef enum logic [2:0] {
    S_IDLE, S_TAG_CHECK, S_EVICT_REQ, S_EVICT_WAIT,
    S_REFILL_REQ, S_REFILL_WAIT, S_DATA_ACCESS, S_WAIT
  } state_e;

  state_e state, state_next;

  // arrays
  logic [127:0]         data_array [p_num_lines];
  logic [TB-1:0]        tag_array  [p_num_lines];
  logic [p_num_lines-1:0] valid_bits, dirty_bits;

  // request register
  mem_req_4B_t req;
  logic        hit_r;
  logic [31:0] rdata_r;

  wire [IB-1:0] idx      = req.addr[4+BB +: IB];
  wire [TB-1:0] tag      = req.addr[31 -: TB];
  wire [1:0]    word_idx = req.addr[3:2];
  wire [1:0]    byte_off = req.addr[1:0];

  wire hit   = valid_bits[idx] && (tag_array[idx] == tag);
  wire dirty = valid_bits[idx] && dirty_bits[idx];

  // victim / refill line addresses
  logic [31:0] victim_addr, refill_addr;
  always_comb begin
    victim_addr = '0;
    victim_addr[31 -: TB]     = tag_array[idx];
    victim_addr[4+BB +: IB]   = idx;
    refill_addr = {req.addr[31:4], 4'b0};
    if (BB > 0) victim_addr[4 +: (BB > 0 ? BB : 1)] = req.addr[4 +: (BB > 0 ? BB : 1)];
  end

  // byte-enable write of the request into a line
  function automatic logic [127:0] merge(logic [127:0] line, mem_req_4B_t r);
    logic [3:0]  be;
    logic [31:0] wd;
    logic [31:0] word;
    unique case (r.len)
      2'd1:    be = 4'b0001 << r.addr[1:0];
      2'd2:    be = 4'b0011 << r.addr[1:0];
      default: be = 4'b1111;
    endcase
    wd   = r.data << (8 * r.addr[1:0]);
    word = line[32*r.addr[3:2] +: 32];
    for (int b = 0; b < 4; b++) if (be[b]) word[8*b +: 8] = wd[8*b +: 8];
    merge = line;
    merge[32*r.addr[3:2] +: 32] = word;
  endfunction

  // next state
  always_comb begin
    state_next = state;
    unique case (state)
      S_IDLE:        if (cachereq_val)  state_next = S_TAG_CHECK;
      S_TAG_CHECK:   state_next = hit ? S_DATA_ACCESS : (dirty ? S_EVICT_REQ : S_REFILL_REQ);
      S_EVICT_REQ:   if (memreq_rdy)    state_next = S_EVICT_WAIT;
      S_EVICT_WAIT:  if (memresp_val)   state_next = S_REFILL_REQ;
      S_REFILL_REQ:  if (memreq_rdy)    state_next = S_REFILL_WAIT;
      S_REFILL_WAIT: if (memresp_val)   state_next = S_DATA_ACCESS;
      S_DATA_ACCESS: state_next = S_WAIT;
      S_WAIT:        if (cacheresp_rdy) state_next = S_IDLE;
      default:       state_next = S_IDLE;
    endcase
  end

  // outputs
  assign cachereq_rdy = (state == S_IDLE);
  assign memresp_rdy  = (state == S_EVICT_WAIT) || (state == S_REFILL_WAIT);
  assign memreq_val   = (state == S_EVICT_REQ) || (state == S_REFILL_REQ);
  assign cacheresp_val = (state == S_WAIT);

  always_comb begin
    memreq_msg        = '0;
    memreq_msg.typ    = (state == S_EVICT_REQ) ? MEM_WRITE : MEM_READ;
    memreq_msg.addr   = (state == S_EVICT_REQ) ? victim_addr : refill_addr;
    memreq_msg.len    = 4'd0;
    memreq_msg.data   = (state == S_EVICT_REQ) ? data_array[idx] : '0;

    cacheresp_msg        = '0;
    cacheresp_msg.typ    = req.typ;
    cacheresp_msg.opaque = req.opaque;
    cacheresp_msg.test   = {1'b0, hit_r};
    cacheresp_msg.len    = req.len;
    cacheresp_msg.data   = (req.typ == MEM_READ) ? rdata_r : '0;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state      <= S_IDLE;
      valid_bits <= '0;
      dirty_bits <= '0;
      hit_r      <= 1'b0;
    end else begin
      state <= state_next;

      if (state == S_IDLE && cachereq_val) req <= cachereq_msg;

      if (state == S_TAG_CHECK) hit_r <= hit;

      if (state == S_REFILL_WAIT && memresp_val) begin
        data_array[idx] <= memresp_msg.data;
        tag_array[idx]  <= tag;
        valid_bits[idx] <= 1'b1;
        dirty_bits[idx] <= 1'b0;
      end

      if (state == S_DATA_ACCESS) begin
        if (req.typ == MEM_WRITE) begin
          data_array[idx] <= merge(data_array[idx], req);
          dirty_bits[idx] <= 1'b1;
        end else begin
          rdata_r <= data_array[idx][32*word_idx +: 32] >> (8 * byte_off);
        end
      end
    end
  end

endmodule
