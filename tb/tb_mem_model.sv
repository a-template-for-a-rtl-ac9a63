// tb_mem_model: behavioural model of the external memory seen by one DMA
// engine (stands in for the interconnect and DDR4 controller, which are not
// part of the RTL). Reduced AXI4 read and write channels; read bursts are
// queued and answered in order, with random gaps when STALL > 0; a write is
// performed when both its address and its data beat have arrived, and
// answered on B. 'mem' is reached hierarchically to load and check data.
module tb_mem_model #(
  parameter int MEM_W = 512,
  parameter int WORDS = 1024,
  parameter int STALL = 0
) (
  input  logic               clk,
  input  logic               ar_valid,
  output logic               ar_ready,
  input  logic [31:0]        ar_addr,
  input  logic [7:0]         ar_len,
  output logic               r_valid,
  input  logic               r_ready,
  output logic [MEM_W-1:0]   r_data,
  output logic               r_last,
  input  logic               aw_valid,
  output logic               aw_ready,
  input  logic [31:0]        aw_addr,
  input  logic [7:0]         aw_len,
  input  logic               w_valid,
  output logic               w_ready,
  input  logic [MEM_W-1:0]   w_data,
  input  logic [MEM_W/8-1:0] w_strb,
  input  logic               w_last,
  output logic               b_valid,
  input  logic               b_ready
);
  localparam int MB = MEM_W / 8;
  logic [MEM_W-1:0] mem [WORDS];
  int ar_q[$];         // word index of each beat still to read
  int last_q[$];
  int aw_q[$];
  logic [MEM_W-1:0] wd_q[$];
  logic [MEM_W/8-1:0] ws_q[$];
  int b_cnt = 0;
  int reads = 0, writes = 0, r_stalls = 0;

  initial begin
    r_valid = 0; r_data = '0; r_last = 0; b_valid = 0;
  end
  assign ar_ready = ar_q.size() < 64;
  assign aw_ready = aw_q.size() < 8;
  assign w_ready  = wd_q.size() < 8;

  always_ff @(posedge clk) begin
    if (ar_valid && ar_ready) begin
      for (int i = 0; i <= int'(ar_len); i++) begin
        ar_q.push_back((int'(ar_addr / MB) + i) % WORDS);
        last_q.push_back(i == int'(ar_len));
      end
    end
    if (aw_valid && aw_ready) aw_q.push_back(int'(aw_addr / MB) % WORDS);
    if (w_valid && w_ready) begin wd_q.push_back(w_data); ws_q.push_back(w_strb); end
    // perform writes
    if (aw_q.size() > 0 && wd_q.size() > 0) begin
      int a;
      logic [MEM_W-1:0] d;
      logic [MEM_W/8-1:0] s;
      a = aw_q.pop_front(); d = wd_q.pop_front(); s = ws_q.pop_front();
      for (int k = 0; k < MB; k++) if (s[k]) mem[a][k*8 +: 8] = d[k*8 +: 8];
      writes++;
      b_cnt++;
    end
    // write responses
    if (b_valid && b_ready) b_cnt--;
    b_valid <= b_cnt > 0;
    // read data
    if (!(r_valid && !r_ready)) begin
      if (r_valid && r_ready) begin
        void'(ar_q.pop_front()); void'(last_q.pop_front());
        reads++;
      end
      if (ar_q.size() > 0 && (STALL == 0 || $urandom % (STALL + 1) != 0)) begin
        r_valid <= 1; r_data <= mem[ar_q[0]]; r_last <= last_q[0] != 0;
      end else begin
        r_valid <= 0;
        if (ar_q.size() > 0) r_stalls++;
      end
    end
  end
endmodule
