// Behavioural model of one core's use of its instruction port, running the
// synthetic loop test: after start_i it jumps to base_i and executes body_i
// sequential words iter_i times. In the middle of the body it takes a short
// forward jump (skipping one word, resolved in decode), and the last word is
// a conditional branch back to base_i (resolved in execute, so the fetch
// stage sees it one cycle later). Wrong-path words are never consumed: the
// model holds instr_ready_o low while a redirect is pending. Every consumed
// word is checked against tb_pkg::mem_word and the expected address. The
// consumer takes a word in a random 7 of 8 cycles. Not synthesizable.
module core_fetch_model (
  input  logic                clk_i,
  input  logic                rst_ni,
  input  logic                start_i,
  input  icache_pkg::addr_t   base_i,
  input  int                  body_i,
  input  int                  iter_i,
  output logic                done_o,
  output int                  words_o,
  output int                  checks_o,
  output int                  fails_o,
  output logic                jump_o,
  output icache_pkg::addr_t   jump_addr_o,
  output logic                branch_o,
  output icache_pkg::addr_t   branch_addr_o,
  input  logic                instr_valid_i,
  input  icache_pkg::addr_t   instr_addr_i,
  input  icache_pkg::word_t   instr_rdata_i,
  output logic                instr_ready_o
);
  import icache_pkg::*;

  typedef enum logic [2:0] {M_IDLE, M_JUMP, M_RUN, M_BR1, M_BR2, M_DONE} mstate_e;
  mstate_e st;
  addr_t   exp_addr;
  int      iter;
  bit      rnd;

  always @(negedge clk_i) rnd = ($urandom % 8) != 0;

  assign instr_ready_o = (st == M_RUN) && rnd;
  assign done_o        = (st == M_DONE);

  always @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st <= M_IDLE; exp_addr <= '0; iter <= 0; words_o <= 0; checks_o <= 0; fails_o <= 0;
      jump_o <= 0; jump_addr_o <= '0; branch_o <= 0; branch_addr_o <= '0;
    end else begin
      jump_o   <= 0;
      branch_o <= 0;
      unique case (st)
        M_IDLE: if (start_i) begin
          jump_o <= 1; jump_addr_o <= base_i; exp_addr <= base_i; iter <= 0;
          st <= M_JUMP;
        end
        M_JUMP: st <= M_RUN;
        M_RUN: if (instr_valid_i && instr_ready_o) begin
          addr_t mid, last;
          mid  = base_i + ADDR_W'(4 * (body_i / 2));
          last = base_i + ADDR_W'(4 * (body_i - 1));
          checks_o <= checks_o + 1;
          if (instr_addr_i != exp_addr || instr_rdata_i != tb_pkg::mem_word(instr_addr_i)) begin
            fails_o <= fails_o + 1;
            $display("core model: got %h/%h, expected address %h", instr_addr_i, instr_rdata_i, exp_addr);
          end
          words_o <= words_o + 1;
          if (instr_addr_i == last) begin
            if (iter + 1 == iter_i) st <= M_DONE;
            else begin
              iter <= iter + 1;
              branch_o <= 1; branch_addr_o <= base_i; exp_addr <= base_i;
              st <= M_BR1;
            end
          end else if (instr_addr_i == mid) begin
            jump_o <= 1; jump_addr_o <= mid + 8; exp_addr <= mid + 8;
            st <= M_JUMP;
          end else exp_addr <= instr_addr_i + 4;
        end
        M_BR1: st <= M_BR2;
        M_BR2: st <= M_RUN;
        M_DONE: if (start_i) begin
          jump_o <= 1; jump_addr_o <= base_i; exp_addr <= base_i; iter <= 0;
          st <= M_JUMP;
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
