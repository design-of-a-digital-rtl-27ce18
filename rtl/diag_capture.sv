// diag_capture: two-trace capture of internal signals for the plot window.
//
// Two multiplexers pick any two of N_SRC probe points of the signal flow
// (sel_a, sel_b). After an arm pulse the block waits for its trigger, then
// stores 2^AW samples of both traces, one every div+1 sample strobes, and
// raises done. trig_mode = 0 triggers at once (the host re-arms at a fixed
// rate for a free-running display); trig_mode = 1 waits for a rising edge on
// trig_event (for instance a set-point step, to record a step response).
// The host reads the traces back through rd_addr / rd_a / rd_b.
// Timing: the memories are written one clock after a kept strobe; reads
// return data one clock after rd_addr. busy is high from arm to done.
// The two simultaneous traces from different stages and the fixed-rate or
// event trigger are the controller's features; the buffer size and the
// control scheme are this design's own.
module diag_capture #(
  parameter int W     = 16,
  parameter int AW    = 10,
  parameter int N_SRC = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic [N_SRC-1:0][W-1:0]       probes,
  input  logic                          sample_stb,
  input  logic [$clog2(N_SRC)-1:0]      sel_a,
  input  logic [$clog2(N_SRC)-1:0]      sel_b,
  input  logic                          trig_mode,
  input  logic                          trig_event,
  input  logic [15:0]                   div,
  input  logic                          arm,
  input  logic [AW-1:0]                 rd_addr,
  output logic [W-1:0]                  rd_a,
  output logic [W-1:0]                  rd_b,
  output logic                          busy,
  output logic                          done
);

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_CAPT, S_DONE} state_e;

  state_e        state;
  logic [W-1:0]  mem_a [2**AW];
  logic [W-1:0]  mem_b [2**AW];
  logic [AW-1:0] waddr;
  logic [15:0]   dcnt;
  logic          ev_q;
  logic          we;

  always_comb we = (state == S_CAPT) && sample_stb && (dcnt == '0);

  always_ff @(posedge clk) begin
    if (we) begin
      mem_a[waddr] <= probes[sel_a];
      mem_b[waddr] <= probes[sel_b];
    end
    rd_a <= mem_a[rd_addr];
    rd_b <= mem_b[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      waddr <= '0;
      dcnt  <= '0;
      ev_q  <= 1'b0;
    end else begin
      ev_q <= trig_event;
      if (arm) begin
        state <= S_WAIT;
        waddr <= '0;
        dcnt  <= '0;
      end else begin
        unique case (state)
          S_IDLE: ;
          S_WAIT: if (!trig_mode || (trig_event && !ev_q)) state <= S_CAPT;
          S_CAPT: if (sample_stb) begin
            dcnt <= (dcnt >= div) ? '0 : dcnt + 1'b1;
            if (we) begin
              waddr <= waddr + 1'b1;
              if (&waddr) state <= S_DONE;
            end
          end
          S_DONE: ;
        endcase
      end
    end
  end

  always_comb begin
    busy = (state == S_WAIT) || (state == S_CAPT);
    done = (state == S_DONE);
  end

endmodule
