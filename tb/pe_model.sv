// pe_model: behavioural stand-in for one multi-threaded processing element
// (micro-engine), for simulation only.
//
// It runs on its own gated clock. Each thread asks for a packet by raising a
// receive request (rcv_req_o with its thread number on rcv_tid_o; one thread
// at a time per PE, lowest number first), waits for the grant that names it,
// then processes the mpacket for proc_cycles_i clock cycles of its own clock
// and asks again. A stopped clock freezes the threads. busy_o counts the
// threads that hold a packet.
module pe_model #(
  parameter int unsigned PE_ID  = 0,
  parameter int unsigned TPP    = 4,
  parameter int unsigned TID_W  = 5,
  parameter int unsigned LT_W   = 2
) (
  input  logic             gclk,
  input  logic             rst_n,
  input  int unsigned      proc_cycles_i,
  output logic             rcv_req_o,
  output logic [LT_W-1:0]  rcv_tid_o,
  input  logic             rcv_ack_i,
  input  logic             grant_i,
  input  logic [TID_W-1:0] grant_tid_i,
  output int unsigned      busy_o,
  output int unsigned      done_o
);

  typedef enum logic [1:0] {WANT, WAITING, BUSY} th_e;
  th_e         st   [TPP];
  int unsigned left [TPP];
  int unsigned n_fin;

  always_comb begin
    n_fin = 0;
    for (int t = 0; t < TPP; t++) if (st[t] == BUSY && left[t] <= 1) n_fin++;
  end

  always_comb begin
    rcv_req_o = 1'b0;
    rcv_tid_o = '0;
    busy_o    = 0;
    for (int t = TPP - 1; t >= 0; t--)
      if (st[t] == WANT) begin rcv_req_o = 1'b1; rcv_tid_o = LT_W'(t); end
    for (int t = 0; t < TPP; t++) if (st[t] == BUSY) busy_o++;
  end

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < TPP; t++) begin st[t] <= WANT; left[t] <= 0; end
      done_o <= 0;
    end else begin
      for (int t = 0; t < TPP; t++) begin
        unique case (st[t])
          WANT:    if (rcv_ack_i && rcv_tid_o == LT_W'(t)) st[t] <= WAITING;
          WAITING: if (grant_i && grant_tid_i == TID_W'(PE_ID * TPP + t)) begin
                     st[t]   <= BUSY;
                     left[t] <= proc_cycles_i;
                   end
          BUSY:    if (left[t] <= 1) st[t] <= WANT;
                   else left[t] <= left[t] - 1;
          default: st[t] <= WANT;
        endcase
      end
      done_o <= done_o + n_fin;
    end
  end

endmodule
