# Lottery arbitration for a four-master shared bus

When several processors share one on-chip bus, a fixed-priority arbiter is
small but can starve its low-priority masters, and it gives no control over how
the bandwidth is split. A *lottery* arbiter fixes this with tickets. Each
master holds some tickets. In every cycle the arbiter draws a pseudo random
number and grants the bus to the requesting master whose share of the tickets
holds that number. A master with twice the tickets wins about twice as often,
and every master with tickets can win.

This RTL holds three arbiters built this way for four masters:

| scheme | tickets | when the number is larger than the ticket total |
|---|---|---|
| static lottery | fixed (1, 2, 3, 4 by default) | nobody is granted |
| dynamic lottery | new values from a ticket generator every cycle | nobody is granted |
| ATM switch | fixed, plus extra tickets for a master whose cell buffer is nearly full | the lowest-priority requester is granted (priority inversion) |

The ATM switch arbiter is the main design. The other two are the plain
lotteries it improves on. All three are kept so that they can be compared.

## The lottery datapath

All three arbiters use the same three stages.

**Number generator (`lfsr_rng`).** This is a 4-bit LFSR. It shifts left and
feeds `q[3] ^ q[0]` into bit 0. From its reset seed `F` it runs through
`F E D A 5 B 6 C 9 2 4 8 1 3 7` and then repeats. Every value 1..15 comes once
per 15-cycle period, and 0 never appears. The draw is therefore a fixed,
repeating sequence, not a random one. Over each period every value is equally
common.

**Partial sums (`lottery_manager`).** Each ticket value is ANDed with its
master's request bit. An adder chain then forms

    S0 = r0 t0,  S1 = S0 + r1 t1,  S2 = S1 + r2 t2,  S3 = S2 + r3 t3 = T

The sums are registered. `SUM_W` sets their width, and they wrap on overflow.
The static and dynamic arbiters use 4-bit sums. With generated tickets the
dynamic sums do wrap: tickets 4, 5, 6 and 7 give `S3 = 22 mod 16 = 6`. This is
deliberate, and it is one reason the plain dynamic lottery so often has no
winner.

**Comparison (`lottery_grant`).** Master *i* wins when `S(i-1) < n <= S(i)`.
The hardware grants the lowest master with `n <= S(i)`. A master that is not
requesting adds no tickets, so its slice is empty and it can never win. If `n`
is above every partial sum, no grant is given. There is one exception. A
master that requests alone is granted in every cycle, whatever the number,
because a lottery with one contender is trivial. Without this rule, master 0
with its single ticket would be served only once every 15 cycles even on an
idle bus.

With tickets 1, 2, 3 and 4 and all masters requesting, the 15 numbers of one
period grant masters 0 to 3 exactly 1, 2, 3 and 4 times, and 5 cycles go
unused. The winners come in the order 3, 2, 2, 3, 1, 2, 3, 0, 1, 3.

Grants are one-hot and last one cycle. Each lottery grants one bus word;
bursts are not modelled.

## The ATM switch arbiter

This is the part that needs the most care. The arbiter adds two mechanisms to
the static lottery.

### Adaptive tickets

In the ATM system each master queues outgoing cells in a buffer
(`atm_cell_buffer`). When the buffer holds `ADAPT_LEVEL` cells or more, the
master raises its adaptive signal `a`. The arbiter (`atm_ticket_lut`) forms
these values per master:

    m_i = r_i & a_i                      (requesting and under pressure)
    g_i = m_i ? ADD_TICKETS[i] : 0       (lookup table)
    f_i = r_i * t_i + g_i                (effective tickets)

The partial sums are then taken over `f` instead of `t`. The winning
probability of master *i* becomes

    P(i) = r_i (t_i + g_i) / sum_j r_j (t_j + g_j)

for a number that falls inside the range.

Worked example, with tickets 1, 2, 3, 4, `r = 1011` and `a = 1000`:
`m = 1000`, `g = (0, 0, 0, 4)`, `f = (1, 2, 0, 8)`, and the partial sums of
`f` are 1, 3, 3, 11.

### Priority inversion instead of an idle bus

A second adder chain sums only the base tickets, giving `V = sum r_j t_j`
(7 in the example). The number is tested against `V`:

* `n <= V`: the master whose slice of the effective sums holds `n` wins.
* `n > V`: the bus goes to the requesting master with the fewest base tickets,
  the lowest index winning a tie. This is the "low-priority" master. The
  `inverted` output marks such grants.

So the ATM arbiter always grants someone while anyone requests. In the example,
the numbers A, 5, B, 6, C, 9 and 2 grant masters 0, 3, 0, 3, 0, 0 and 1.

The range test uses `V`, not the effective total (11 in the example). This has
a consequence that is easy to miss. Extra tickets widen a master's slice and
push the slices of the masters after it towards `V`, but the test never
reaches past `V`. The *last* requesting master therefore gains nothing from
its own adaptive signal. It only gains when masters before it lose
probability.

The default `ADD_TICKETS` of 4 per master is this design's choice. It follows
the single value given for master 3 in the example.

### Cells and the shared bus

`lottery_bus_top` connects four `atm_cell_buffer`s (FIFO, `DEPTH` 8, 32-bit
cells) to the arbiter and to `shared_bus`. A buffer requests while it is not
empty. In a grant cycle the granted master's head cell goes onto `bus_data`,
`bus_valid` rises, `bus_owner` names the master and the cell leaves its
buffer. A push into a full buffer is dropped and flagged on `cell_drop`.

## Measured behaviour

`tb_arbitration_workloads` runs the three arbiters with four masters.

With saturated requests, over 240 lotteries the shares come out exactly as
the rules predict. The test checks them exactly:

| arbiter | M0 | M1 | M2 | M3 | no winner |
|---|---|---|---|---|---|
| static, all request, tickets 1,2,3,4 | 6.7 % | 13.3 % | 20.0 % | 26.7 % | 33.3 % |
| dynamic, all request | 50.0 % | 15.0 % | 11.7 % | 7.1 % | 16.2 % |
| ATM, requests 1011, adaptive 1000 | 60.0 % | 13.3 % | 0 % | 26.7 % | 0 % |

The dynamic lottery's tilt towards master 0 comes from its 4-bit wrapping
sums. Once the sums overflow, the low partial sums catch most numbers. Under
the ATM arbiter, master 0 also collects every over-range draw by priority
inversion.

With persistent requests, each master raises a request with 12 % probability
per cycle and holds it until granted. All three arbiters see the same request
stream. The test reports the average latency from request to grant, in
clocks, including the 2-clock pipeline:

| arbiter | M0 | M1 | M2 | M3 |
|---|---|---|---|---|
| static | 5.3 | 4.1 | 3.5 | 3.1 |
| dynamic | 2.5 | 2.8 | 3.2 | 3.6 |
| ATM | 2.1 | 2.3 | 2.6 | 2.7 |

The mean over the masters falls from 4.0 clocks (static) to 2.4 clocks (ATM),
about 40 % less.
The test checks that the ATM mean is below the static mean. It also checks
that the static and ATM arbiters serve every request within 45 clocks. The
absolute numbers depend on this traffic. They are not the published figures,
which were taken under traffic that is not specified.

## Timing

| path | latency |
|---|---|
| request / tickets → partial sums | 1 clock (registered) |
| partial sums + number → grant | 1 clock (registered) |
| request raised → earliest grant | 2 clocks |
| cell pushed → request visible | 1 clock |
| grant → bus word | same cycle (combinational multiplexer) |

Because requests take two clocks to reach the grant, a master whose last cell
was just sent can still be granted once more. The bus then stays idle for that
cycle. This shows up as `atm_gnt` set with `bus_valid` low.

Reset is synchronous and active high. It sets the LFSR to `F`, the ticket
generator to 1, 2, 3, 4, and the sums, grants and FIFOs to zero.

## Dynamic ticket generator

`ticket_generator` gives master 0 a count that rises by one every cycle,
starting at 1. Master *i* gets that count plus *i*, modulo 16. This matches
the ticket pattern the dynamic scheme was characterised with. The ticket
values carry no meaning about traffic. They only exercise a lottery whose
tickets change every cycle.

## Files

| module | role |
|---|---|
| `lottery_pkg` | master count (4), 4-bit ticket and number widths, vector types |
| `lfsr_rng` | 4-bit LFSR, numbers 1..15 |
| `lottery_manager` | AND plus adder chain, registered partial sums |
| `lottery_grant` | comparison and one-cycle grant, no grant above the total, lone request always granted |
| `static_lottery_arbiter` | fixed tickets (`TICKETS`, default 1,2,3,4) |
| `ticket_generator`, `dynamic_lottery_arbiter` | generated tickets |
| `atm_ticket_lut` | `m = r & a`, extra-ticket lookup, `f = r t + g` |
| `atm_lottery_block` | comparison with priority inversion |
| `atm_switch_arbiter` | complete ATM arbiter |
| `atm_cell_buffer` | per-master cell FIFO, request and adaptive signal |
| `shared_bus` | grant-driven bus multiplexer |
| `lottery_bus_top` | ATM system plus the static and dynamic arbiters side by side |

The three arbitration systems in `lottery_bus_top` share only the clock and
reset. Each has its own ports. The processors that feed the cells and consume
the bus words are outside the RTL.

## Simulating

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and ends with a watchdog. For example:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/lottery_pkg.sv tb/tb_lottery_bus_top.sv --top-module tb_lottery_bus_top
    ./obj_dir/Vtb_lottery_bus_top

What the testbenches check:

* Block tests compare against independent reference models. These cover the
  LFSR sequence, the partial sums with wrap-around, the interval rule, and the
  ATM rules including the worked example above. They also cover the
  cycle-accurate two-clock pipeline and the FIFO behaviour.
* `tb_lottery_bus_top` runs the whole design at its default parameters for
  about 6000 cycles. The four masters receive traffic at different rates.
  Every bus word must be the oldest outstanding cell of its owner. Every ATM
  grant must match a cycle-accurate model. After a drain phase, nothing may be
  left behind.
* The same test counts priority inversions, adaptive signals, boosted wins,
  dropped cells, idle grants, and cycles where the static or dynamic lottery
  had no winner. It fails if any of these never happens.
* It also prints the average latency in cycles per word and the grant counts
  per master.
* `tb_arbitration_workloads` produces the measurements in the section above.

## How far to trust it, and what is this design's own

Taken from the characterisation of the original design:

* four masters
* 4-bit tickets and the static example tickets 1, 2, 3, 4
* the 1..15 number range and the exact number sequence
* the AND plus adder structure of the partial sums
* the trivial grant of a lone request
* the registered partial sums, 4 bits wide with wrap-around
* the no-grant behaviour above the total
* the ticket-generator pattern
* the ATM quantities `m = r & a`, `g`, `f` and `V`, and the worked example's
  grants

Chosen here, because no source fixes them:

* the LFSR taps and seed (chosen to give the known sequence)
* the grant register and the exact clock alignment of grant to number
* the reading of "low-priority master" as fewest base tickets
* the lookup-table contents (4 extra tickets each)
* the 8-bit ATM sums
* the cell FIFO: depth 8, 32-bit cells, adaptive threshold 6, drop on full
* the shared-bus multiplexer
* reset behaviour

The published results for these schemes (average latency, acceptance rate,
waiting time and bandwidth per master) depend on request traffic that was
never specified. This RTL does not try to reproduce those numbers. The
end-to-end testbench reports the same kinds of measures for its own traffic.
They show the intended trends: ticket-weighted sharing, and the ATM scheme
granting in every cycle that has a request.

Not included: the fixed-priority and TDM/round-robin arbiters that the lottery
schemes are compared against, multi-word bursts with a maximum transfer size,
and the processors themselves.
